// bfd_counter: counter reset by the beat-frequency detector.
//
// The beat flip-flop output drives the counter's reset: while `clr` is high
// the count is forced to zero, and while it is low the counter counts up by
// one per clock (when `en` is high), wrapping at 2**WIDTH. The count thus
// measures how long the beat signal has been low, which is the value passed
// to the post-processing stage. The reset-from-beat rule is the design's;
// the width (8, matching the output word), the synchronous clear and the
// enable input are this design's choices.
// Timing: `count` is a register; `clr` wins over `en`; 0 after reset.
module bfd_counter #(
  parameter int unsigned WIDTH = rtpg_pkg::OUT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             clr,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   count <= '0;
    else if (clr) count <= '0;
    else if (en)  count <= count + 1'b1;
  end

endmodule
