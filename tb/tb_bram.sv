// tb_bram: self-checking testbench for the DRP block RAM.
// Writes random words to random addresses while reading random addresses,
// and checks every read word, one clock after its address, against a shadow
// copy of the memory (read-before-write on an address collision).
module tb_bram;
  localparam int unsigned AW = 5, DW = 16;
  logic clk = 1'b0, we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] shadow [32];
  logic [DW-1:0] exp_q;
  int checks = 0, failures = 0;

  bram #(.ADDR_W(AW), .DATA_W(DW)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) shadow[i] = '0;
    // fill every word first
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = DW'($urandom);
      @(posedge clk); shadow[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      we = $urandom_range(0, 1) == 1;
      waddr = AW'($urandom); wdata = DW'($urandom);
      raddr = (c % 7 == 0) ? waddr : AW'($urandom);
      exp_q = shadow[raddr];            // old word on a collision
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== exp_q) begin
        failures++;
        $display("read %0d: got %h exp %h", raddr, rdata, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
