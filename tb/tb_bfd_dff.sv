// tb_bfd_dff: self-checking testbench for the beat-frequency flip-flop.
// First drives random data and sampling-clock waveforms and checks that the
// output takes the data only in the clock after each rising edge of the
// sampling input. Then drives a divide-by-2 data and divide-by-3 sampling
// pattern and checks that the output is the f/6 beat: high three clocks,
// low three clocks.
module tb_bfd_dff;
  logic clk = 1'b0, rst_n = 1'b0, d_fa = 1'b0, c_fb = 1'b0, beat;
  logic exp_beat = 1'b0, c_prev = 1'b0;
  int checks = 0, failures = 0, toggles = 0, run = 0;
  int runs [$];

  bfd_dff dut (.clk, .rst_n, .d_fa, .c_fb, .beat);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_check();
    @(posedge clk);
    if (c_fb && !c_prev) exp_beat = d_fa;
    c_prev = c_fb;
    @(negedge clk);
    checks++;
    if (beat != exp_beat) begin
      failures++;
      $display("got %0b exp %0b", beat, exp_beat);
    end
  endtask

  initial begin
    @(negedge clk); rst_n = 1'b1;
    for (int c = 0; c < 500; c++) begin
      d_fa = $urandom_range(0, 1) == 1;
      c_fb = $urandom_range(0, 1) == 1;
      step_check();
    end
    // divide-by-2 against divide-by-3
    for (int c = 0; c < 120; c++) begin
      d_fa = (c % 2 == 1);
      c_fb = (c % 3 != 0);
      step_check();
    end
    // beat waveform check on a fresh pass, recording run lengths
    run = 0;
    for (int c = 0; c < 120; c++) begin
      logic prev_beat;
      prev_beat = beat;
      d_fa = (c % 2 == 1);
      c_fb = (c % 3 != 0);
      step_check();
      if (beat != prev_beat) begin runs.push_back(run); run = 1; toggles++; end
      else run++;
    end
    for (int i = 2; i < runs.size(); i++) begin
      checks++;
      if (runs[i] != 3) begin failures++; $display("beat half-period %0d, exp 3", runs[i]); end
    end
    checks++;
    if (toggles < 30) begin failures++; $display("beat toggled only %0d times", toggles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
