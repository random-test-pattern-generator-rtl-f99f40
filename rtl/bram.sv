// bram: block RAM holding the DRP configuration words.
//
// A simple dual-port RAM of 2**ADDR_W words of DATA_W bits (32 x 16 by
// default, from the 5-bit address and 16-bit data of the block diagram).
// Port A writes: `wdata` is stored at `waddr` on a clock edge with `we` high.
// Port B reads synchronously: `rdata` shows the word at `raddr` one clock
// after the address is presented, as an FPGA block RAM does. A read and a
// write of the same address in one cycle return the old word. The array is
// cleared at start-up so that every word read is defined; there is no reset.
module bram #(
  parameter int unsigned ADDR_W = rtpg_pkg::ADDR_W,
  parameter int unsigned DATA_W = rtpg_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  localparam int unsigned WORDS = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [WORDS];

  initial for (int i = 0; i < WORDS; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
