// addr_gen: address generation module.
//
// Produces the BRAM read address. It starts at addr_first after reset and
// moves one location forward on every cycle in which `step` is high; after
// addr_last it wraps back to addr_first, so a user picks the slice of the
// BRAM that holds the DRP program for an application. The 5-bit width is the
// block diagram's; the first/last range inputs and the wrap rule are this
// design's own reading of "addresses based on user requirements". If
// addr_last < addr_first the counter runs to the top of the address space and
// wraps to addr_first from there.
//
// Implementation: the reset is to constants only. A `fresh` flag, set by
// reset and cleared by the first step, makes `addr` show addr_first until the
// counter register has been loaded, so no non-constant value is needed at
// reset.
// Timing: `addr` changes on the clock edge after `step` (it also follows
// addr_first combinationally until the first step after reset).
module addr_gen #(
  parameter int unsigned ADDR_W = rtpg_pkg::ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              step,
  input  logic [ADDR_W-1:0] addr_first,
  input  logic [ADDR_W-1:0] addr_last,
  output logic [ADDR_W-1:0] addr
);

  logic [ADDR_W-1:0] addr_q;
  logic              fresh;

  assign addr = fresh ? addr_first : addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q <= '0;
      fresh  <= 1'b1;
    end else if (step) begin
      fresh <= 1'b0;
      if (addr == addr_last || addr == ADDR_W'((1 << ADDR_W) - 1))
        addr_q <= addr_first;
      else
        addr_q <= addr + 1'b1;
    end
  end

endmodule
