// tb_post_processor: self-checking testbench for the XOR post-processing
// register. Checks that the word stays 0 before the first load even when
// enabled, that load copies the seed (00001010 as in the published
// waveform), and that each enabled clock yields the LFSR shift of the word
// (taps at bits 7,5,4,3) XORed with the bit-reversed counter; with enable low
// the word holds. The reference is written bit by bit. Finally, with the
// counter at 0, the word must run through its full maximal-length period:
// 255 clocks for the 8-bit instance and 65535 for a second, 16-bit instance.
module tb_post_processor;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst_n = 1'b0, enable = 1'b0, load = 1'b0;
  logic [W-1:0] seed = '0, cnt = '0, out;
  logic [W-1:0] exp_w = '0;
  bit seeded = 0;
  int checks = 0, failures = 0, n_load = 0, n_gen = 0, n_hold = 0;

  post_processor #(.WIDTH(W)) dut (.clk, .rst_n, .enable, .load, .seed, .cnt, .out);

  logic        load16 = 1'b0;
  logic [15:0] out16;
  post_processor #(.WIDTH(16)) dut16 (.clk, .rst_n, .enable, .load(load16), .seed(16'h0001),
                                      .cnt(16'h0000), .out(out16));

  always #5 clk = ~clk;

  function automatic logic [W-1:0] ref_next(logic [W-1:0] r, logic [W-1:0] c);
    logic [W-1:0] n;
    n[0] = r[7] ^ r[5] ^ r[4] ^ r[3] ^ c[7];
    for (int i = 1; i < W; i++) n[i] = r[i-1] ^ c[W-1-i];
    return n;
  endfunction

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle();
    @(posedge clk);
    if (load) begin exp_w = seed; seeded = 1; n_load++; end
    else if (enable && seeded) begin exp_w = ref_next(exp_w, cnt); n_gen++; end
    else n_hold++;
    @(negedge clk);
    checks++;
    if (out != exp_w) begin
      failures++;
      $display("got %b exp %b (load=%0b en=%0b)", out, exp_w, load, enable);
    end
  endtask

  initial begin
    @(negedge clk); rst_n = 1'b1;
    enable = 1'b1;
    repeat (10) begin cnt = W'($urandom); cycle(); end   // not seeded yet: stays 0
    seed = 8'b0000_1010; load = 1'b1; cycle(); load = 1'b0;
    checks++;
    if (out != 8'b0000_1010) begin failures++; $display("seed not loaded"); end
    cnt = '0;
    repeat (20) cycle();                                  // pure LFSR steps
    for (int c = 0; c < 1000; c++) begin
      enable = $urandom_range(0, 3) != 0;
      load   = $urandom_range(0, 49) == 0;
      seed   = W'($urandom);
      cnt    = W'($urandom);
      cycle();
    end
    load = 1'b0;
    // maximal-length periods with the counter held at 0
    begin
      int p8, p16;
      enable = 1'b1; cnt = '0; seed = 8'h01; load = 1'b1; load16 = 1'b1;
      cycle();
      load = 1'b0; load16 = 1'b0;
      p8 = 0; p16 = 0;
      for (int c = 1; c <= 70000; c++) begin
        @(negedge clk);
        if (p8 == 0 && out == 8'h01) p8 = c;
        if (p16 == 0 && out16 == 16'h0001) p16 = c;
        if (p8 != 0 && p16 != 0) break;
      end
      checks += 2;
      if (p8 != 255)   begin failures++; $display("8-bit period %0d, exp 255", p8); end
      if (p16 != 65535) begin failures++; $display("16-bit period %0d, exp 65535", p16); end
    end
    checks++;
    if (n_load < 5 || n_gen < 100 || n_hold < 10) begin
      failures++; $display("coverage: load=%0d gen=%0d hold=%0d", n_load, n_gen, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
