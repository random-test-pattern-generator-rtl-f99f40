// dcm_drp_controller: DCM dynamic-reconfiguration (DRP) controller.
//
// It buffers DRP words read from the BRAM in an 8-entry FIFO and, each time
// DRP REQ is raised, takes the oldest word and applies it to the two clock
// dividers as the DCM-A DRP and DCM-B DRP enables. That a FIFO sits inside
// the controller and that the controller drives the two DRP enables follows
// the design description; the rest is this design's own choice:
//   * Fetching: while `fetch_en` is high and the FIFO has room for one more
//     word counting the read already in flight, `addr_step` is raised. This
//     issues a BRAM read of the current address and moves the address
//     generator on. The word arrives on `data_in` one clock later and is
//     written into the FIFO, so the FIFO never overflows.
//   * Applying: `drp_req` with a non-empty FIFO pops the head word and
//     registers its bit 0 as `dcm_a_drp` and bit 1 as `dcm_b_drp` (bit positions in
//     rtpg_pkg). `drp_req` with an empty FIFO is ignored and the
//     enables keep their values.
// Timing: the enables change on the clock edge that ends the `drp_req` cycle.
// Both enables are 0 after reset.
module dcm_drp_controller #(
  parameter int unsigned DATA_W     = rtpg_pkg::DATA_W,
  parameter int unsigned FIFO_DEPTH = rtpg_pkg::FIFO_DEPTH
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fetch_en,
  output logic              addr_step,
  input  logic [DATA_W-1:0] data_in,
  input  logic              drp_req,
  output logic              dcm_a_drp,
  output logic              dcm_b_drp,
  output logic              fifo_full,
  output logic              fifo_empty
);

  localparam int unsigned CNT_W = $clog2(FIFO_DEPTH + 1);

  logic              rd_pending;  // a BRAM read was issued last cycle
  logic [DATA_W-1:0] head;
  logic [CNT_W-1:0]  count;
  logic              pop;

  // Room for one more word once the in-flight read has landed.
  assign addr_step = fetch_en &&
                     ((32'(count) + 32'(rd_pending)) < 32'(FIFO_DEPTH));
  assign pop       = drp_req && !fifo_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_pending <= 1'b0;
    else        rd_pending <= addr_step;
  end

  drp_fifo #(.DATA_W(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk    (clk),
    .rst_n  (rst_n),
    .wr_en  (rd_pending),
    .wr_data(data_in),
    .rd_en  (pop),
    .rd_data(head),
    .full   (fifo_full),
    .empty  (fifo_empty),
    .count  (count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcm_a_drp <= 1'b0;
      dcm_b_drp <= 1'b0;
    end else if (pop) begin
      dcm_a_drp <= head[rtpg_pkg::DRP_A_EN_BIT];
      dcm_b_drp <= head[rtpg_pkg::DRP_B_EN_BIT];
    end
  end

  // A fetched word always finds room in the FIFO.
  assert property (@(posedge clk) disable iff (!rst_n) rd_pending |-> !fifo_full)
    else $error("dcm_drp_controller: fetched word would overflow the FIFO");

endmodule
