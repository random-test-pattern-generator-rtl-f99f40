// tb_drp_fifo: self-checking testbench for the DRP FIFO.
// Random writes and reads, with phases biased towards filling and towards
// draining, are compared with a queue model: head word, count, full and
// empty flags. Writes when full and reads when empty must be ignored.
module tb_drp_fifo;
  localparam int unsigned DW = 16, DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [DW-1:0] wr_data = '0, rd_data;
  logic full, empty;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [DW-1:0] model [$];
  int checks = 0, failures = 0, n_full = 0, n_empty_rd = 0, n_full_wr = 0, n_both = 0;
  int bias;

  drp_fifo #(.DATA_W(DW), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state();
    checks++;
    if (count != ($clog2(DEPTH+1))'(model.size()) || full != (model.size() == DEPTH) ||
        empty != (model.size() == 0)) begin
      failures++;
      $display("state: count=%0d full=%0b empty=%0b model=%0d", count, full, empty, model.size());
    end
    if (model.size() > 0) begin
      checks++;
      if (rd_data != model[0]) begin
        failures++;
        $display("head: got %h exp %h", rd_data, model[0]);
      end
    end
  endtask

  initial begin
    @(negedge clk); rst_n = 1'b1;
    check_state();
    for (int c = 0; c < 3000; c++) begin
      bias = ((c / 100) % 2 == 0) ? 3 : 1;   // alternate filling / draining phases
      wr_en = $urandom_range(0, 3) < bias;
      rd_en = $urandom_range(0, 3) >= bias;
      if (c % 13 == 0) begin wr_en = 1'b1; rd_en = 1'b1; end
      wr_data = DW'($urandom);
      @(posedge clk);
      if (wr_en && rd_en && model.size() > 0 && model.size() < DEPTH) n_both++;
      if (rd_en && model.size() == 0) n_empty_rd++;
      if (wr_en && model.size() == DEPTH) n_full_wr++;
      begin
        bit do_rd, do_wr;
        do_rd = rd_en && model.size() > 0;
        do_wr = wr_en && model.size() < DEPTH;
        if (do_rd) void'(model.pop_front());
        if (do_wr) model.push_back(wr_data);
      end
      if (model.size() == DEPTH) n_full++;
      @(negedge clk);
      check_state();
    end
    checks++;
    if (n_full == 0 || n_empty_rd == 0 || n_full_wr == 0 || n_both == 0) begin
      failures++;
      $display("coverage: full=%0d empty_rd=%0d full_wr=%0d both=%0d", n_full, n_empty_rd, n_full_wr, n_both);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
