// tb_dcm_a: self-checking testbench for the divide-by-2 source.
// With the enable high the output must toggle on every clock (period of two
// clocks, 50 % duty cycle); with it low it must stay at 0. Enable windows of
// random length are tried.
module tb_dcm_a;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clk_div2;
  logic exp_q = 1'b0;
  int checks = 0, failures = 0, rises = 0, en_cycles = 0, exp_rises = 0, len;

  dcm_a dut (.clk, .rst_n, .en, .clk_div2);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1'b1;
    for (int w = 0; w < 20; w++) begin
      en = (w % 2 == 0);
      len = $urandom_range(1, 30);
      if (en) exp_rises += (len + 1) / 2;   // each window starts from 0
      repeat (len) begin
        @(posedge clk);
        exp_q = en ? ~exp_q : 1'b0;
        if (en) en_cycles++;
        if (en && exp_q) rises++;
        @(negedge clk);
        checks++;
        if (clk_div2 != exp_q) begin
          failures++;
          $display("w=%0d: got %0b exp %0b", w, clk_div2, exp_q);
        end
      end
    end
    // rate: one rising edge per two enabled clocks
    checks++;
    if (rises != exp_rises) begin
      failures++;
      $display("rate: %0d rises in %0d cycles", rises, en_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
