// post_processor: XOR post-processing stage and output register.
//
// Holds the WIDTH-bit output word `out`. A high `load` copies `seed` into it.
// After a seed has been loaded, every clock with `enable` high replaces the
// word with a mix of itself and the beat counter:
//   shifted = {out[WIDTH-2:0], ^(out & TAPS)}      (LFSR shift, Fibonacci form)
//   out    <= shifted ^ bit_reverse(cnt)
// The counter bits cross over the word (counter bit i feeds output bit
// WIDTH-1-i), which is this design's reading of the "zigzag" XOR wiring.
// TAPS defaults to a maximal-length polynomial for the word width (bit k-1
// set for each term x^k): x^8+x^6+x^5+x^4+1 (8'hB8) for 8 bits and
// x^16+x^14+x^13+x^11+1 (16'hB400) for 16 bits, among others; with the
// counter at 0 the word then cycles through all 2**WIDTH-1 non-zero values.
// From the design: XOR network, the seed load with load over enable, the
// output pins clk/enable/load/seed/out and the 8-bit width. Own choices: the
// exact XOR wiring, and that the word stays unchanged (0 after reset) until
// the first load, as the published waveform shows a zero output until the
// seed is loaded.
// Timing: one new word per enabled clock; `out` is a register.
module post_processor #(
  parameter int unsigned      WIDTH = rtpg_pkg::OUT_W,
  parameter logic [WIDTH-1:0] TAPS  = WIDTH'(rtpg_pkg::lfsr_taps(WIDTH))
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic [WIDTH-1:0] cnt,
  output logic [WIDTH-1:0] out
);

  logic             seeded;
  logic [WIDTH-1:0] cnt_rev;
  logic [WIDTH-1:0] next_word;

  always_comb begin
    for (int i = 0; i < WIDTH; i++) cnt_rev[i] = cnt[WIDTH-1-i];
    next_word = {out[WIDTH-2:0], ^(out & TAPS)} ^ cnt_rev;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out    <= '0;
      seeded <= 1'b0;
    end else if (load) begin
      out    <= seed;
      seeded <= 1'b1;
    end else if (enable && seeded) begin
      out    <= next_word;
    end
  end

endmodule
