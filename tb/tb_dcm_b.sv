// tb_dcm_b: self-checking testbench for the divide-by-3 source.
// After enable the output must repeat the pattern 1,1,0 (high two clocks of
// three) and rise exactly once every three clocks; while disabled it must be
// 0. The internal flip-flop states must follow 00 -> 10 -> 01.
module tb_dcm_b;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clk_div3;
  int phase = 0;   // number of enabled clocks since the enable went high
  int checks = 0, failures = 0, rises = 0, en_cycles = 0;
  logic prev = 1'b0, exp_o;

  dcm_b dut (.clk, .rst_n, .en, .clk_div3);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1'b1;
    checks++;
    if (clk_div3 != 1'b0) begin failures++; $display("not 0 after reset"); end
    for (int w = 0; w < 20; w++) begin
      en = (w % 2 == 0);
      phase = 0;
      repeat ($urandom_range(1, 40)) begin
        @(posedge clk);
        if (en) begin phase++; en_cycles++; end
        @(negedge clk);
        exp_o = en ? ((phase % 3) != 0) : 1'b0;
        checks++;
        if (clk_div3 != exp_o) begin
          failures++;
          $display("w=%0d phase=%0d: got %0b exp %0b", w, phase, clk_div3, exp_o);
        end
        if (en && (phase % 3) == 1) begin
          checks++;
          if ({dut.qa, dut.qb} != 2'b10) begin failures++; $display("state not 10"); end
        end
        if (en && (phase % 3) == 2) begin
          checks++;
          if ({dut.qa, dut.qb} != 2'b01) begin failures++; $display("state not 01"); end
        end
        if (clk_div3 && !prev) rises++;
        prev = clk_div3;
      end
    end
    // rate: one rising edge per three enabled clocks (+ one per partial window)
    checks++;
    if (rises < en_cycles / 3 || rises > en_cycles / 3 + 10) begin
      failures++;
      $display("rate: %0d rises in %0d cycles", rises, en_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
