// rtpg_bfd_top: random test pattern generator using beat-frequency detection.
//
// Two clock dividers derived from the system clock, DCM-A (f/2) and DCM-B
// (f/3), stand in for the free-running ring oscillators of a classic
// beat-frequency random number generator. A D flip-flop samples DCM-A on the
// edges of DCM-B and so produces the beat between them; the beat clears a
// counter, and an XOR post-processing register mixes the counter into an
// 8-bit output word, one word per clock, after a seed has been loaded.
// Which dividers run is set at run time: DRP words are stored in a 32 x 16
// BRAM, fetched by an address generator into the DRP controller's FIFO, and
// applied one per DRP request.
//
// Data path (all on `clk`):
//   addr_gen -> bram -> dcm_drp_controller (FIFO) -> dcm_a, dcm_b
//   dcm_a, dcm_b -> bfd_dff -> bfd_counter -> post_processor -> out
//
// Interface: clk, enable, load, seed and out are the generator's pins
// (enable gates the counter and the output register; load copies seed into
// out). drp_req applies the next stored DRP word. fetch_en, addr_first and
// addr_last control fetching; bram_we/bram_waddr/bram_wdata fill the BRAM.
// rst_n is an asynchronous active-low reset. The remaining outputs expose
// the internal signals for observation.
// The block structure and the widths follow the design; the reset, the BRAM
// write port, the fetch control and the observation outputs are this
// design's own additions.
module rtpg_bfd_top #(
  parameter int unsigned ADDR_W     = rtpg_pkg::ADDR_W,
  parameter int unsigned DATA_W     = rtpg_pkg::DATA_W,
  parameter int unsigned FIFO_DEPTH = rtpg_pkg::FIFO_DEPTH,
  parameter int unsigned OUT_W      = rtpg_pkg::OUT_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // generator pins
  input  logic              enable,
  input  logic              load,
  input  logic [OUT_W-1:0]  seed,
  output logic [OUT_W-1:0]  out,
  // DRP control
  input  logic              drp_req,
  input  logic              fetch_en,
  input  logic [ADDR_W-1:0] addr_first,
  input  logic [ADDR_W-1:0] addr_last,
  // BRAM fill port
  input  logic              bram_we,
  input  logic [ADDR_W-1:0] bram_waddr,
  input  logic [DATA_W-1:0] bram_wdata,
  // observation
  output logic              dcm_a_drp,
  output logic              dcm_b_drp,
  output logic              dcm_a_clk,
  output logic              dcm_b_clk,
  output logic              beat,
  output logic              fifo_full,
  output logic              fifo_empty
);

  logic              addr_step;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] bram_rdata;
  logic [OUT_W-1:0]  count;

  addr_gen #(.ADDR_W(ADDR_W)) u_addr_gen (
    .clk       (clk),
    .rst_n     (rst_n),
    .step      (addr_step),
    .addr_first(addr_first),
    .addr_last (addr_last),
    .addr      (addr)
  );

  bram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_bram (
    .clk  (clk),
    .we   (bram_we),
    .waddr(bram_waddr),
    .wdata(bram_wdata),
    .raddr(addr),
    .rdata(bram_rdata)
  );

  dcm_drp_controller #(.DATA_W(DATA_W), .FIFO_DEPTH(FIFO_DEPTH)) u_drp_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .fetch_en  (fetch_en),
    .addr_step (addr_step),
    .data_in   (bram_rdata),
    .drp_req   (drp_req),
    .dcm_a_drp (dcm_a_drp),
    .dcm_b_drp (dcm_b_drp),
    .fifo_full (fifo_full),
    .fifo_empty(fifo_empty)
  );

  dcm_a u_dcm_a (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (dcm_a_drp),
    .clk_div2(dcm_a_clk)
  );

  dcm_b u_dcm_b (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (dcm_b_drp),
    .clk_div3(dcm_b_clk)
  );

  bfd_dff u_bfd_dff (
    .clk  (clk),
    .rst_n(rst_n),
    .d_fa (dcm_a_clk),
    .c_fb (dcm_b_clk),
    .beat (beat)
  );

  bfd_counter #(.WIDTH(OUT_W)) u_counter (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (enable),
    .clr  (beat),
    .count(count)
  );

  post_processor #(.WIDTH(OUT_W)) u_post (
    .clk   (clk),
    .rst_n (rst_n),
    .enable(enable),
    .load  (load),
    .seed  (seed),
    .cnt   (count),
    .out   (out)
  );

endmodule
