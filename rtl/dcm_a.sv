// dcm_a: DCM-A, the divide-by-2 clock source of the beat-frequency detector.
//
// A single D flip-flop whose inverted output is fed back to its D input, so
// its output toggles on every rising clock edge and runs at half the input
// frequency with a 50 % duty cycle. That structure and the ratio are the
// design's; the enable is the DCM-A DRP signal from the DRP controller. While
// the enable is low the flip-flop is held at 0 (this design's choice), so the
// output always starts with a rising edge on the first clock after enable.
// Timing: `clk_div2` is a register output, low after reset.
module dcm_a (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic clk_div2
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   clk_div2 <= 1'b0;
    else if (en)  clk_div2 <= ~clk_div2;
    else          clk_div2 <= 1'b0;
  end

endmodule
