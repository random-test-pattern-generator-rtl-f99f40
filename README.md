# Beat-frequency random test pattern generator

A random pattern generator for built-in self-test (BIST) that takes its
variation from the *beat* between two clocks of different frequency, instead
of from a plain linear feedback shift register (LFSR). Classic beat-frequency
generators use two free-running ring oscillators; here the two clocks come
from two run-time configurable clock dividers (standing in for FPGA digital
clock managers, DCMs) fed by the system clock:

* **DCM-A** divides the clock by 2,
* **DCM-B** divides the clock by 3.

A D flip-flop samples DCM-A at each rising edge of DCM-B. Because the two
periods differ, the sampling point slides along DCM-A and the flip-flop output
is a square wave at the difference frequency f/2 − f/3 = f/6. That beat
signal clears a counter; the counter is mixed by an XOR network into an 8-bit
output register that is loaded from a seed and then yields one new word every
clock.

Which dividers run is programmable. Configuration words (DRP words, after the
dynamic reconfiguration port of an FPGA DCM) are stored in a small block RAM,
fetched in order by an address generator into a FIFO, and applied one at a
time whenever the user raises a DRP request.

```
                 5-bit            16-bit
  addr_gen ──── address ─► bram ── data ─► dcm_drp_controller ──► dcm_a_drp ─► dcm_a (f/2) ─┐ D
     ▲                      ▲                │ (8-entry FIFO)  └─► dcm_b_drp ─► dcm_b (f/3) ─┤ "clock"
     └──── addr_step ───────┼────────────────┘   ▲                                          ▼
                       bram_we/waddr/wdata     drp_req                               bfd_dff (beat)
                                                                                          │ clear
                                      seed, load, enable ─► post_processor ◄── count ── bfd_counter
                                                                  │
                                                                 out[7:0]
```

Everything runs on one clock, `clk`. All files are SystemVerilog (IEEE
1800-2017), one module or package per file in `rtl/`, testbenches in `tb/`.

## How a word is produced

### The two dividers

`dcm_a` is a single flip-flop with its inverted output fed back, enabled by
`dcm_a_drp`: it toggles every clock, 50 % duty cycle.

`dcm_b` is the classic two-JK-flip-flop divide-by-3. Both K inputs are tied
high, JA = not QB and JB = QA, so the pair steps (QA,QB) = 00 → 10 → 01 → 00.
The output is QA OR QB: high for two clocks, low for one.

While its enable is low, each divider is held at 0. When it is enabled it
starts from 0, so its first rising edge comes one clock after the enable.

### Beat detection

`bfd_dff` is the flip-flop that in the original concept has DCM-A on D and
DCM-B on its clock pin. Here it stays on `clk`. It loads DCM-A in the cycle
just after DCM-B has risen, so it sees the same DCM-A value as a flip-flop
clocked by DCM-B, but its output changes one system clock later. With both
dividers enabled at the same edge (clock edges counted from the enable):

```
edge     1 2 3 4 5 6 7 8 9 10 11 12
DCM-A    1 0 1 0 1 0 1 0 1 0  1  0
DCM-B    1 1 0 1 1 0 1 1 0 1  1  0
beat     0 1 1 1 0 0 0 1 1 1  0  0     (period 6 = f/6)
```

Other DRP settings give other behaviour. With only DCM-A running, DCM-B never
rises and the beat keeps its last value. With only DCM-B running, the beat
samples a constant 0. With both off, nothing moves.

### Counter and post-processing

`bfd_counter` is reset by the beat. While `beat` is high the count is forced
to 0. While it is low, the count goes up by one each clock that `enable` is
high, wrapping at 256.

`post_processor` holds the output word. `load` copies `seed` into it and has
priority. After a seed has been loaded, every clock with `enable` high
computes

```
out <= { out[6:0], out[7]^out[5]^out[4]^out[3] }  XOR  bit_reverse(count)
```

This is an 8-bit maximal-length LFSR step (x^8+x^6+x^5+x^4+1), with the
counter XORed in crosswise: counter bit *i* goes to output bit 7−*i*. With
the counter at 0 the word runs through all 255 non-zero values. Until the
first load the word stays 0, even if `enable` is high. So a sequence always
starts from a known seed, e.g. seed `00001010` appears on `out` one clock
after `load` and changes every clock after that.

**How random is this?** In this RTL both dividers come from the same clock,
so the beat, the counter and therefore the whole output sequence are fully
determined by the seed, the DRP program and the timing of `enable`, `load`
and `drp_req`. Think of it as a seeded pseudo-random pattern generator whose
sequence is disturbed by the beat counter. Real unpredictability would need
DCM-A and DCM-B to run from independent, jittering clock sources. That would
turn `bfd_dff` into a true clock-domain crossing that needs its own
synchroniser. The XOR mix does not guarantee that words never repeat.

## Programming the dividers

### DRP words

| bit  | meaning                          |
|------|----------------------------------|
| 0    | 1 = run DCM-A (divide by 2)      |
| 1    | 1 = run DCM-B (divide by 3)      |
| 15:2 | reserved, ignored                |

The bit positions are defined in `rtl/rtpg_pkg.sv` (`DRP_A_EN_BIT`,
`DRP_B_EN_BIT`).

### Storing and fetching

1. Write the words into the 32 × 16 `bram` through `bram_we`, `bram_waddr`
   and `bram_wdata`. The BRAM has no reset; it starts all-zero.
2. Set `addr_first` and `addr_last` to the slice of the BRAM that holds the
   program. Then raise `fetch_en`. `addr_gen` starts at `addr_first`. It moves up by one on each fetch and wraps
   from `addr_last` (or from 31) back to `addr_first`, so the program repeats.
3. `dcm_drp_controller` raises `addr_step` only while the FIFO has room for
   one more word, counting the read still in flight. The BRAM read takes one
   clock; the word is then written into the 8-entry `drp_fifo`. When the FIFO
   is full (`fifo_full`), fetching simply pauses; no word is ever dropped.

### Applying a word

A one-clock pulse on `drp_req` pops the oldest FIFO word. Bits 0 and 1 are
registered into `dcm_a_drp` and `dcm_b_drp` at the end of that clock, and the
dividers react on the following edge. A request while `fifo_empty` is high is
ignored: the enables keep their values. After reset both enables are 0, so
nothing beats until the first request.

`drp_fifo` is a single-clock FIFO. It has wrapping read and write pointers as
wide as its address, and an occupancy counter: it goes up on a write when not
full, down on a read when not empty, and stays the same when both happen.
`empty` is count = 0, `full` is count = DEPTH. The head word is visible
without a read (first-word fall-through).

## Top-level interface (`rtpg_bfd_top`)

| port | dir | width | function |
|------|-----|-------|----------|
| `clk` | in | 1 | system clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `enable` | in | 1 | runs the counter and the output register |
| `load` | in | 1 | copy `seed` into `out` (wins over `enable`) |
| `seed` | in | OUT_W | seed word |
| `out` | out | OUT_W | random word, registered |
| `drp_req` | in | 1 | apply the next DRP word from the FIFO |
| `fetch_en` | in | 1 | allow fetching DRP words from the BRAM |
| `addr_first`, `addr_last` | in | ADDR_W | DRP program range in the BRAM |
| `bram_we`, `bram_waddr`, `bram_wdata` | in | 1 / ADDR_W / DATA_W | BRAM write port |
| `dcm_a_drp`, `dcm_b_drp` | out | 1 | current divider enables |
| `dcm_a_clk`, `dcm_b_clk` | out | 1 | divider outputs |
| `beat` | out | 1 | beat flip-flop output |
| `fifo_full`, `fifo_empty` | out | 1 | DRP FIFO flags |

The outputs after `out` are there for observation only.

Parameters (package `rtpg_pkg` holds the defaults):

| parameter | default | meaning |
|-----------|---------|---------|
| `ADDR_W` | 5 | BRAM address width (32 words) |
| `DATA_W` | 16 | DRP word width |
| `FIFO_DEPTH` | 8 | DRP FIFO entries, a power of two |
| `OUT_W` | 8 | seed, counter and output width |

`post_processor` picks its LFSR taps from `rtpg_pkg::lfsr_taps(WIDTH)`. That
function has maximal-length polynomials for widths 4–8, 12, 16, 24 and 32;
other widths fall back to the 8-bit taps and lose the maximal period.

## Where the design comes from and where it is its own

Taken from the original description of the generator:

* the chain address generator → BRAM → DRP controller with FIFO → DCM-A/DCM-B;
* the 5-bit address, 16-bit data and 8-entry FIFO;
* the FIFO's counter and pointer rules;
* divide-by-2 as a D flip-flop with fed-back Q̄;
* divide-by-3 from two JK flip-flops with K tied high, an OR and an inverter;
* DCM-A as data and DCM-B as clock of the beat flip-flop;
* the beat resetting the counter;
* an XOR post-processing stage;
* the pins `clk`, `enable`, `load`, `seed`, `out` and the 8-bit seed.

Choices made in this RTL, where the description is silent:

* the reset;
* the BRAM write port and its one-clock read latency;
* the `addr_first`/`addr_last` range of the address generator;
* `fetch_en` and the back-pressure from the FIFO to the address generator;
* the DRP word layout;
* request-on-empty being ignored;
* dividers held at 0 while disabled;
* the derived J equations of the divide-by-3;
* the single-clock beat flip-flop, which switches one clock later than a
  DCM-B-clocked one;
* the counter width and its enable;
* the exact XOR network;
* holding the output at 0 until the first seed load.

Known departures:

* **Output width.** The published synthesis figures (16 slice registers, 35
  I/O pins, a 16-bit output register in the timing path) fit a 16-bit seed
  and output (1+1+1+16+16 = 35 pins). The published waveform and text use 8
  bits. This RTL defaults to 8; set `OUT_W = 16` for the other reading.
  `tb_rtpg_bfd_top_w16` runs the whole design at 16 bits.
* **Size.** The reported build had 16 registers. This design synthesises to
  about 40 flip-flops, plus the 8 × 16 FIFO and the 32 × 16 BRAM as
  memories. The reported figure cannot have included the whole configuration
  path.
* **Real DCMs.** No FPGA clock-manager primitive is used. Phase shifting and
  other DCM features are not modelled; the two dividers are the whole of the
  DCM function here.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares the
module with an independently written reference, has a watchdog, and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_addr_gen` | address sequence for several ranges, including last < first |
| `tb_bram` | random writes and reads against a shadow memory, read-before-write |
| `tb_drp_fifo` | random traffic against a queue model; full, empty, write-when-full, read-when-empty |
| `tb_dcm_drp_controller` | fill to full and stall, words applied in address order, request on empty ignored |
| `tb_dcm_a` | toggle every clock, one rise per two clocks, 0 while disabled |
| `tb_dcm_b` | pattern 1,1,0, states 00→10→01, one rise per three clocks |
| `tb_bfd_dff` | random stimulus, then f/2 against f/3: beat half-period of exactly 3 clocks |
| `tb_bfd_counter` | random clear/enable, wrap |
| `tb_post_processor` | seed load, hold before seeding, LFSR-plus-counter step; 255- and 65535-clock periods at 8 and 16 bits |
| `tb_rtpg_bfd_top` | whole design at default sizes (see below) |
| `tb_rtpg_bfd_top_w16` | the same run with a 16-bit seed and output |

`tb_rtpg_bfd_top` runs the design at its default sizes. It stores a five-word
program (both dividers, A only, B only, both off, both on with reserved bits
set) and fetches it until the FIFO is full. It loads seed `00001010`, then
applies the program three times over, with random `enable` and `load` in
between, and finally drains the FIFO. A cycle-level reference model checks
`out`, `beat` and both divider outputs every clock. Each DRP application is
checked against the program order, and the f/6 beat rate is checked. The test
fails unless each of these happened at least once:

* output held before the first seed;
* seed load;
* FIFO-full stall;
* request on an empty FIFO;
* program wrap;
* counter cleared by the beat;
* each of the four divider modes;
* output held with `enable` low.

To run a testbench with Verilator 5, from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl \
    rtl/rtpg_pkg.sv tb/tb_rtpg_bfd_top.sv --top-module tb_rtpg_bfd_top
./obj_dir/Vtb_rtpg_bfd_top
```

Replace the name to run another testbench. Every testbench finishes within a
second.

Assertions in `drp_fifo` (count within 0..DEPTH) and `dcm_drp_controller` (a
fetched word never meets a full FIFO) run when `--assert` is given.
