// tb_bfd_counter: self-checking testbench for the beat-cleared counter.
// Random enable and clear inputs, with long clear-free stretches so that the
// counter wraps, are compared with a reference count every clock.
module tb_bfd_counter;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr = 1'b0;
  logic [W-1:0] count;
  int exp_cnt = 0;
  int checks = 0, failures = 0, wraps = 0, clears = 0;

  bfd_counter #(.WIDTH(W)) dut (.clk, .rst_n, .en, .clr, .count);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      en  = $urandom_range(0, 7) != 0;
      clr = (c % 1000 < 500) ? ($urandom_range(0, 9) == 0) : 1'b0;
      @(posedge clk);
      if (clr) begin exp_cnt = 0; clears++; end
      else if (en) begin
        exp_cnt = exp_cnt + 1;
        if (exp_cnt == (1 << W)) begin exp_cnt = 0; wraps++; end
      end
      @(negedge clk);
      checks++;
      if (count != W'(exp_cnt)) begin
        failures++;
        $display("c=%0d: got %0d exp %0d", c, count, exp_cnt);
      end
    end
    checks++;
    if (wraps == 0 || clears == 0) begin failures++; $display("no wrap or clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
