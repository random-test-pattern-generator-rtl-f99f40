// tb_dcm_drp_controller: self-checking testbench for the DRP controller.
// The testbench plays the address generator and BRAM: it keeps a read
// address that advances on addr_step and returns the stored word one clock
// later. It checks that the FIFO fills to full and stalls fetching, that each
// drp_req applies the next word in address order to the two DRP enables, and
// that drp_req on an empty FIFO changes nothing.
module tb_dcm_drp_controller;
  localparam int unsigned DW = 16, DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0, fetch_en = 1'b0, drp_req = 1'b0;
  logic addr_step, dcm_a_drp, dcm_b_drp, fifo_full, fifo_empty;
  logic [DW-1:0] data_in = '0;
  logic [DW-1:0] prog [32];
  int rd_addr = 0, next_pop = 0;
  int checks = 0, failures = 0, n_stall = 0, n_empty_req = 0, n_pops = 0;
  logic exp_a = 1'b0, exp_b = 1'b0;

  dcm_drp_controller #(.DATA_W(DW), .FIFO_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  // address generator + BRAM stand-in
  always @(posedge clk) begin
    data_in <= prog[rd_addr];
    if (addr_step) rd_addr <= (rd_addr + 1) % 32;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(string what);
    checks++;
    if (dcm_a_drp != exp_a || dcm_b_drp != exp_b) begin
      failures++;
      $display("%s: drp a/b got %0b%0b exp %0b%0b", what, dcm_a_drp, dcm_b_drp, exp_a, exp_b);
    end
  endtask

  task automatic request();
    logic was_empty;
    @(negedge clk);
    was_empty = fifo_empty;
    drp_req = 1'b1;
    @(negedge clk);
    drp_req = 1'b0;
    if (was_empty) n_empty_req++;
    else begin
      exp_a = prog[next_pop % 32][0];
      exp_b = prog[next_pop % 32][1];
      next_pop++; n_pops++;
    end
    check_out("after request");
  endtask

  initial begin
    for (int i = 0; i < 32; i++) prog[i] = DW'($urandom);
    @(negedge clk); rst_n = 1'b1;
    check_out("reset");
    // empty FIFO: request is ignored
    request();
    checks++;
    if (!fifo_empty) begin failures++; $display("not empty at start"); end
    // fill
    fetch_en = 1'b1;
    repeat (DEPTH + 4) @(negedge clk);
    checks++;
    if (!fifo_full) begin failures++; $display("FIFO did not fill"); end
    repeat (5) begin
      @(negedge clk);
      if (fifo_full && !addr_step) n_stall++;
    end
    checks++;
    if (rd_addr != DEPTH) begin failures++; $display("fetched %0d words, exp %0d", rd_addr, DEPTH); end
    // interleave requests with continued fetching
    for (int k = 0; k < 40; k++) begin
      request();
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    // stop fetching and drain
    fetch_en = 1'b0;
    repeat (3) @(negedge clk);
    while (!fifo_empty) request();
    request();   // on empty: ignored
    checks++;
    if (n_stall == 0 || n_empty_req < 2 || n_pops < 40) begin
      failures++;
      $display("coverage: stall=%0d empty_req=%0d pops=%0d", n_stall, n_empty_req, n_pops);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
