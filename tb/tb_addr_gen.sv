// tb_addr_gen: self-checking testbench for the address generator.
// Drives random step pulses over a few address ranges (including a range that
// ends at the top of the address space and one with last < first) and
// compares the address each cycle with a reference sequence.
module tb_addr_gen;
  localparam int unsigned AW = 5;
  logic clk = 1'b0, rst_n = 1'b0, step = 1'b0;
  logic [AW-1:0] first, last, addr;
  int checks = 0, failures = 0, wraps = 0;
  int exp_addr;

  addr_gen #(.ADDR_W(AW)) dut (.clk, .rst_n, .step, .addr_first(first), .addr_last(last), .addr);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_range(input int f, input int l, input int cycles);
    first = AW'(f); last = AW'(l);
    rst_n = 1'b0; step = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    exp_addr = f;
    for (int c = 0; c < cycles; c++) begin
      step = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      if (step) begin
        if (exp_addr == l || exp_addr == 31) begin exp_addr = f; wraps++; end
        else exp_addr = exp_addr + 1;
      end
      checks++;
      if (addr != AW'(exp_addr)) begin
        failures++;
        $display("addr mismatch range %0d..%0d: got %0d exp %0d", f, l, addr, exp_addr);
      end
    end
  endtask

  initial begin
    first = '0; last = '1;
    @(negedge clk);
    run_range(0, 31, 200);
    run_range(4, 9, 200);
    run_range(0, 3, 100);
    run_range(20, 5, 200);   // last < first: runs to 31 then wraps
    run_range(7, 7, 50);
    checks++;
    if (wraps < 10) begin failures++; $display("too few wraps: %0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
