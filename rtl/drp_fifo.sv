// drp_fifo: synchronous FIFO used by the DCM-DRP controller.
//
// A dual-port memory array with a write pointer and a read pointer, both as
// wide as the array's address, so they wrap to 0 on their own after the last
// location. An occupancy counter gives the flags: `empty` when it is 0,
// `full` when it reaches DEPTH. A write is taken only when not full and
// raises the counter; a read is taken only when not empty and lowers it;
// both in one cycle leave it unchanged. These rules follow the FIFO
// description that goes with the controller; the depth of 8 is its
// "8-bit FIFO" read as eight locations. DEPTH must be a power of two.
//
// Interface: one clock. `rd_data` always shows the word at the head of the
// queue (first-word fall-through); `rd_en` removes it at the clock edge.
module drp_fifo #(
  parameter int unsigned DATA_W = rtpg_pkg::DATA_W,
  parameter int unsigned DEPTH  = rtpg_pkg::FIFO_DEPTH
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       wr_en,
  input  logic [DATA_W-1:0]          wr_data,
  input  logic                       rd_en,
  output logic [DATA_W-1:0]          rd_data,
  output logic                       full,
  output logic                       empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [PTR_W-1:0]  wr_ptr, rd_ptr;
  logic              do_wr, do_rd;

  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (count == '0);
  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign rd_data = mem[rd_ptr];

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // The counter never leaves 0..DEPTH.
  assert property (@(posedge clk) disable iff (!rst_n) count <= ($clog2(DEPTH+1))'(DEPTH))
    else $error("drp_fifo: count out of range");

endmodule
