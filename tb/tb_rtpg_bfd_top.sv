// tb_rtpg_bfd_top: end-to-end testbench for the beat-frequency random pattern
// generator at its default sizes (5-bit address, 16-bit DRP words, 8-entry
// FIFO, 8-bit output).
//
// It stores a five-word DRP program in the BRAM (both dividers, DCM-A only,
// DCM-B only, both off, both on with the reserved bits set), lets the
// controller fetch it into the FIFO, loads the seed 00001010 and then applies
// the program word by word with DRP requests, looping over it three times.
// A cycle-level reference model, written independently of the RTL, predicts
// the divider outputs, the beat flip-flop, the counter and the output word;
// every cycle they are compared with the design. The applied DRP enables are
// checked against the program order. Each mechanism is counted and must
// occur: output held before the first seed, seed load, FIFO full stall,
// request on an empty FIFO, program address wrap, counter cleared by the
// beat, each of the four divider modes, enable low holding the output, and
// the f/6 beat (high three clocks, low three) when both dividers run.
module tb_rtpg_bfd_top;
  localparam int unsigned AW = 5, DW = 16, OW = 8, DEPTH = 8, PLEN = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic enable = 1'b0, load = 1'b0, drp_req = 1'b0, fetch_en = 1'b0, bram_we = 1'b0;
  logic [OW-1:0] seed = '0, out;
  logic [AW-1:0] addr_first = '0, addr_last = AW'(PLEN - 1), bram_waddr = '0;
  logic [DW-1:0] bram_wdata = '0;
  logic dcm_a_drp, dcm_b_drp, dcm_a_clk, dcm_b_clk, beat, fifo_full, fifo_empty;

  rtpg_bfd_top dut (.*);

  always #5 clk = ~clk;

  logic [DW-1:0] prog [PLEN] = '{16'h0003, 16'h0001, 16'h0002, 16'h0000, 16'hFFFF};

  // ---------------- reference model ----------------
  logic m_a = 0, m_qa = 0, m_qb = 0, m_cq = 0, m_beat = 0, m_seeded = 0;
  logic [OW-1:0] m_cnt = '0, m_out = '0;
  logic en_a = 0, en_b = 0;  // DRP enables seen before the coming edge

  function automatic logic [OW-1:0] mix(logic [OW-1:0] r, logic [OW-1:0] c);
    logic [OW-1:0] n;
    n[0] = r[7] ^ r[5] ^ r[4] ^ r[3] ^ c[7];
    for (int i = 1; i < OW; i++) n[i] = r[i-1] ^ c[OW-1-i];
    return n;
  endfunction

  int checks = 0, failures = 0;
  int n_preseed_hold = 0, n_load = 0, n_full_stall = 0, n_empty_req = 0, n_wrap = 0;
  int n_beat_clear = 0, n_mode_ab = 0, n_mode_a = 0, n_mode_b = 0, n_mode_off = 0;
  int n_enable_hold = 0, n_pops = 0;

  always @(posedge clk) if (rst_n) begin
    logic b, nqa, nqb, na;
    b = m_qa | m_qb;
    // counter and output use the beat / count from before the edge
    if (load) begin m_out = seed; m_seeded = 1; n_load++; end
    else if (enable && m_seeded) m_out = mix(m_out, m_cnt);
    else if (m_seeded) n_enable_hold++;
    else if (enable) n_preseed_hold++;
    if (m_beat) begin
      if (m_cnt != 0) n_beat_clear++;
      m_cnt = '0;
    end else if (enable) m_cnt = m_cnt + 1'b1;
    if (b && !m_cq) m_beat = m_a;
    m_cq = b;
    na  = en_a ? ~m_a : 1'b0;
    nqa = en_b ? (~m_qa & ~m_qb) : 1'b0;
    nqb = en_b ? (m_qa & ~m_qb) : 1'b0;
    m_a = na; m_qa = nqa; m_qb = nqb;
    case ({en_a, en_b})
      2'b11: n_mode_ab++;
      2'b10: n_mode_a++;
      2'b01: n_mode_b++;
      default: n_mode_off++;
    endcase
    if (fetch_en && fifo_full) n_full_stall++;
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (out != m_out || beat != m_beat || dcm_a_clk != m_a || dcm_b_clk != (m_qa | m_qb)) begin
      failures++;
      if (failures < 10)
        $display("%0t: out %h/%h beat %0b/%0b a %0b/%0b b %0b/%0b", $time, out, m_out,
                 beat, m_beat, dcm_a_clk, m_a, dcm_b_clk, m_qa | m_qb);
    end
    en_a = dcm_a_drp;
    en_b = dcm_b_drp;
  end

  // ---------------- watchdog ----------------
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  logic exp_a = 0, exp_b = 0;

  task automatic request();
    logic was_empty;
    @(negedge clk);
    was_empty = fifo_empty;
    drp_req = 1'b1;
    @(negedge clk);
    drp_req = 1'b0;
    if (was_empty) n_empty_req++;
    else begin
      exp_a = prog[n_pops % PLEN][0];
      exp_b = prog[n_pops % PLEN][1];
      n_pops++;
      if (n_pops % PLEN == 0) n_wrap++;
    end
    checks++;
    if (dcm_a_drp != exp_a || dcm_b_drp != exp_b) begin
      failures++;
      $display("%0t: DRP enables %0b%0b exp %0b%0b", $time, dcm_a_drp, dcm_b_drp, exp_a, exp_b);
    end
  endtask

  int run, toggles_ok, half_periods;
  logic last_beat;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // fill the BRAM: the program, then other words after it
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      bram_we = 1'b1; bram_waddr = AW'(i);
      bram_wdata = (i < PLEN) ? prog[i] : DW'($urandom);
    end
    @(negedge clk); bram_we = 1'b0;
    // enabled but not seeded: output stays 0
    enable = 1'b1;
    repeat (10) @(negedge clk);
    // request on an empty FIFO: ignored
    request();
    // fetch until the FIFO is full
    fetch_en = 1'b1;
    repeat (DEPTH + 6) @(negedge clk);
    checks++;
    if (!fifo_full) begin failures++; $display("FIFO not full"); end
    // load the seed of the published waveform
    seed = 8'b0000_1010; load = 1'b1;
    @(negedge clk); load = 1'b0;
    checks++;
    if (out != 8'b0000_1010) begin failures++; $display("seed not on out: %b", out); end
    // first word: both dividers -> beat at f/6
    request();
    run = 0; half_periods = 0; toggles_ok = 0; last_beat = beat;
    for (int c = 0; c < 66; c++) begin
      @(negedge clk);
      if (beat != last_beat) begin
        if (c > 12) begin
          half_periods++;
          if (run == 3) toggles_ok++;
        end
        run = 1; last_beat = beat;
      end else run++;
    end
    checks++;
    if (half_periods < 8 || toggles_ok != half_periods) begin
      failures++;
      $display("beat rate: %0d of %0d half-periods were 3 clocks", toggles_ok, half_periods);
    end
    // the rest of the program, three times over, with random enable and loads
    for (int k = 1; k < 3 * PLEN; k++) begin
      request();
      for (int c = 0; c < 40; c++) begin
        @(negedge clk);
        enable = $urandom_range(0, 5) != 0;
        load   = $urandom_range(0, 59) == 0;
        seed   = OW'($urandom);
      end
      load = 1'b0; enable = 1'b1;
    end
    // drain and request on the empty FIFO
    fetch_en = 1'b0;
    repeat (3) @(negedge clk);
    while (!fifo_empty) request();
    request();
    repeat (20) @(negedge clk);

    // every mechanism must have happened
    checks++;
    if (n_preseed_hold == 0 || n_load < 2 || n_full_stall == 0 || n_empty_req < 2 || n_wrap < 2 ||
        n_beat_clear == 0 || n_mode_ab == 0 || n_mode_a == 0 || n_mode_b == 0 || n_mode_off == 0 ||
        n_enable_hold == 0) begin
      failures++;
      $display("coverage missing");
    end
    $display("mechanisms: preseed_hold=%0d load=%0d full_stall=%0d empty_req=%0d wrap=%0d beat_clear=%0d",
             n_preseed_hold, n_load, n_full_stall, n_empty_req, n_wrap, n_beat_clear);
    $display("modes: ab=%0d a=%0d b=%0d off=%0d enable_hold=%0d pops=%0d",
             n_mode_ab, n_mode_a, n_mode_b, n_mode_off, n_enable_hold, n_pops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
