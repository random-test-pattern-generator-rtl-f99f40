// bfd_dff: the beat-frequency detector flip-flop.
//
// The DCM-A output (f/2) is the D input and the DCM-B output (f/3) is the
// sampling clock, as the design specifies. When both run, DCM-B samples
// DCM-A at a phase that shifts by one input clock each time, so the
// flip-flop output is a square wave at the difference frequency
// f/2 - f/3 = f/6: high for three input clocks, low for three.
//
// This design's choice is to keep everything on one clock: instead of using
// the DCM-B output as a clock, the flip-flop runs on `clk` and loads `d_fa`
// only in the cycle in which `c_fb` has just risen (c_fb high, and low the
// cycle before). It therefore captures the DCM-A value present right after
// the DCM-B edge, and `beat` changes on the clock edge that ends that cycle,
// one input clock later than a flip-flop clocked by DCM-B directly.
// `beat` is 0 after reset and holds its value while DCM-B does not toggle.
module bfd_dff (
  input  logic clk,
  input  logic rst_n,
  input  logic d_fa,
  input  logic c_fb,
  output logic beat
);

  logic c_fb_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_fb_q <= 1'b0;
      beat   <= 1'b0;
    end else begin
      c_fb_q <= c_fb;
      if (c_fb && !c_fb_q) beat <= d_fa;
    end
  end

endmodule
