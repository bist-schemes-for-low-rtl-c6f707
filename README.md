# MSIC low-power BIST test pattern generator

In a scan-based BIST, the test pattern generator is usually an LFSR. Its pseudorandom patterns toggle about half of the circuit's inputs on every clock, and half of the scan cells on every shift. The circuit under test (CUT) therefore burns far more power during self-test than in normal operation. This design replaces the LFSR with a *multiple single-input-change* (MSIC) generator. It builds each pattern from two parts:

- a **seed** from a conventional LFSR, which changes rarely (once every 2L patterns), and
- a **Johnson code word** from an L-stage Johnson counter. Consecutive Johnson vectors differ in exactly one bit (a single input change, SIC). Any one code word, read as a serial bit string, has at most two transitions.

Every input group, whether a column of primary inputs or a scan chain, receives `Johnson bit XOR seed bit`. Each group therefore sees its own low-transition sequence, and the XOR with the seed keeps the groups from being copies of each other. A new seed every 2L patterns keeps the pattern set spread over the input space.

The RTL implements:

- the generator in both forms described for it: **test-per-clock**, a new pattern on the primary inputs every clock, and **test-per-scan**, patterns shifted into multiple scan chains;
- both SIC generators: the **reconfigurable Johnson counter** for short chains and the **scalable SIC counter** for chains much longer than their number;
- the scan chains and a MISR, so that a test-per-scan BIST can be simulated end to end.

The CUT itself is not included. Every BIST brings out its CUT ports.

## Building blocks

| module | role |
|---|---|
| `msic_pkg` | state, scheme and generator enums; table of primitive LFSR polynomials (3..32 bits) |
| `seed_lfsr` | seed generator: M_SEED-stage Fibonacci LFSR, one step per CLK1 |
| `rj_counter` | reconfigurable Johnson counter, L stages, three modes |
| `ssic_counter` | scalable SIC counter: adder, subtractor, multiplexers, M-bit shift register |
| `xor_network` | M XORs, chain i = J_i ^ S_i (test-per-scan) |
| `xor_grid` | N x MC XOR grid, PI[c*N+r] = J_r ^ S_c (test-per-clock) |
| `tpg_ctrl` | clock and control circuit: CLK1/CLK2 enables, Init, RJ_Mode, SE, capture |
| `scan_chains` | M scan chains of L cells (model of the CUT's scan cells) |
| `misr` | 16-bit multiple-input signature register |
| `msic_tpg_clock` | test-per-clock generator: ctrl + LFSR + Johnson counter + grid |
| `msic_bist_scan` | test-per-scan BIST: ctrl + LFSR + SIC generator + XORs + chains + MISR |
| `msic_bist_top` | all three generators side by side |

There is one clock, `clk`, and one reset, `rst_n`, which is asynchronous and active low. The design has two test clocks: CLK1 for the slow seed generator and CLK2 for the Johnson counter and the scan shifting. Both are realised as clock enables (`clk1_en`, `clk2_en`) on `clk`, so the whole design is one clock domain.

## The reconfigurable Johnson counter

L D flip-flops form a shift chain, D1 to DL. A multiplexer controlled by `RJ_Mode` chooses what enters D1:

| RJ_Mode | Init | D1 takes | effect of clocking CLK2 |
|---|---|---|---|
| 0 | x | complement of DL | Johnson counter: 2L steps visit 2L SIC vectors and return |
| 1 | 1 | DL | circular shift: after L steps the vector is back; meanwhile stage i has emitted the whole code word, rotated by i |
| 1 | 0 | 0 | clear: L+1 steps give all zeros |

Starting from zero, the Johnson vector after k steps has ones in its lowest k bits (k <= L) or zeros in its lowest k-L bits (k > L). `j[i]` is the output of stage D(i+1).

The circular-shift mode is what makes the counter useful for scan. Each stage drives one scan chain through its XOR. After one Johnson step, L circular shifts push a full rotated copy of the current Johnson vector into every chain, each chain with a different rotation, and then the counter is exactly where it started. The next Johnson step (RJ_Mode=0) moves to the next vector. The seed bit is constant during the shift, so chain i receives a rotated Johnson word XOR a constant. A rotated Johnson word has at most two transitions around the chain. A pseudorandom fill averages L/2.

## The scalable SIC counter

For chains much longer than their number (L >> M), an L-stage Johnson counter would waste flip-flops: only M of its outputs feed chains. The scalable SIC counter produces the same kind of code word serially, with roughly log2(L) bits of counting state:

- **adder** (`cnt`, K = clog2(L) bits, plus a phase bit): steps on the falling edge of SE, once per scan. It counts 0..L-1 and then flips the phase. `cnt` is the number of 1s (phase 0) or 0s (phase 1) that the next scan starts with.
- **multiplexers and subtractor** (`sub`, K bits, clocked by CLK2): while SE=0 the multiplexers load `cnt` into `sub`. While SE=1 `sub` counts down to zero and stops there.
- **M_Johnson** = `~phase` while SE=1 and `sub != 0`, otherwise `phase`. Over the L shift cycles of scan s this gives c = s mod L copies of one value, then L-c copies of the other. That is a Johnson code word with at most one transition, and 2L scans give 2L different words.
- **M-bit shift register**: clocked by CLK2 while SE=1. M_Johnson enters it, and stage i drives the XOR of chain i. Each chain therefore receives the serial word delayed by i+1 shifts. The chains receive different code words, as with the circular shift above.

Timing requirement: the adder updates at the end of the first SE=0 cycle. SE must then stay low for at least one more cycle with `clk2_en` high, so that the subtractor loads the new count. The controller provides this: the capture cycle is followed by the Johnson-step cycle.

## Test procedure (tpg_ctrl)

`tpg_ctrl` is a Moore state machine. A test starts with `start` and runs `test_len` seeds, with 2L patterns per seed. `test_len = 0` finishes at once.

**Test-per-clock** (`SCHEME_PER_CLOCK`, used by `msic_tpg_clock`, L = N):

```
INIT  (N+1 cycles)  RJ_Mode=1 Init=0, CLK2: clear the Johnson counter
loop test_len times:
  SEED  (1)         CLK1: new seed
  JSTEP (2N)        RJ_Mode=0, CLK2 every cycle: a new pattern every clock
DONE
```

`pattern_valid` is high in the cycle after each Johnson step, when the new pattern is on `pi`. Cycles from the start cycle to the first `done` cycle, both included: 2 + (N+1) + T(1+2N).

The 16 x 16 grid holds 256 primary inputs. Each Johnson step flips one grid row, which is one input in each of the 16 columns, so the mean input transition density is 1/N = 1/16 per clock. A pseudorandom source gives about 1/2.

**Test-per-scan** (`SCHEME_PER_SCAN`, used by `msic_bist_scan`):

```
INIT  (L+1)
loop test_len times:
  SEED (1)
  repeat 2L times:
    JSTEP   (1)  RJ_Mode=0, CLK2: next Johnson vector (the scalable counter loads its subtractor)
    SHIFT   (L)  RJ_Mode=1 Init=1 SE=1, CLK2: circular shift, chains shift in, old response shifts out
    CAPTURE (1)  SE=0: scan cells load the CUT's next state, MISR takes the CUT's outputs
FLUSH (L)        SE=1: shift the last response into the MISR
DONE
```

This takes 2 + (L+1) + T(1 + 2L(L+2)) + L cycles, with the same counting as above. CLK1 and CLK2 never tick together, and SE is never high during a Johnson step; both rules are assertions. The primary inputs are the seed, so they stay constant for the 2L(L+2) cycles of one seed.

## Test-per-scan BIST (msic_bist_scan)

- `GEN = GEN_RJC` uses the reconfigurable Johnson counter; `GEN = GEN_SSC` uses the scalable SIC counter.
- `M_SEED >= M` is required, because every chain needs its own seed bit.
- The seed drives the CUT's primary inputs (`cut_pi`). `cut_scan_q` carries the scan-cell values.
- The CUT must return `cut_po` (primary outputs) and `cut_next` (next-state values) combinationally. They are used in the cycle where `capture` is high.
- The MISR input is built as follows:
  - while shifting: chain i's output goes into MISR bit i;
  - at capture: primary output p goes into bit (M+p) mod 16.
- The MISR is cleared on `start`. `signature` is final when `done` rises. It must be compared with the signature of a fault-free CUT, computed off-line.

## Top level (msic_bist_top)

The top holds three independent instances. Each has its own `*_start`, `*_test_len`, `*_busy` and `*_done`.

| prefix | instance | default size |
|---|---|---|
| `pc_` | test-per-clock generator | 16 x 16 grid, 16-bit seed, 256 PIs |
| `ps_` | test-per-scan, Johnson counter | 4 chains x 8 cells, 8-bit seed, 8 POs |
| `ss_` | test-per-scan, scalable SIC counter | 4 chains x 32 cells, 8-bit seed, 8 POs |

The seed, Johnson vector, scan inputs and SE are also brought out for observation.

Sizes against the ISCAS'85 circuits that such generators are usually evaluated on (input counts from the benchmark set): c2670 has 233 primary inputs, c3540 50, c5315 178, c6288 32 and c7552 207. All of them fit the 256-input grid. For a larger circuit, raise `PC_N`/`PC_MC`. The seed width must stay within the 3..32 bits that the polynomial table covers.

## What is specified and what is chosen

These parts follow the generator's description:

- the three Johnson counter modes and their control lines;
- the structure of the scalable SIC counter: adder, subtractor, K multiplexers selected by SE, M-bit shift register;
- the XOR pairing J_i ^ S_i, and the grid numbering X1 = J1^S1, X2 = J2^S1, X(n+1) = J1^S2;
- both test procedures (seed, then Johnson steps; in test-per-scan, one Johnson step then L circular shifts, 2L times per seed);
- the seed driving the primary inputs in test-per-scan, and a seed width no smaller than the chain count.

These are this design's own choices:

- **Sizes.** All sizes are parameters; no sizes are specified beyond an 8-bit seed, 8-bit vectors and four scan outputs, which set the `ps_` instance. The 16 x 16 grid and the 32-cell chains of the `ss_` instance were picked here.
- **LFSR polynomials.** These come from a standard maximal-length table, in Fibonacci form, with reset seed 1.
- **Scalable counter adder edge.** The original description names both the rising and the falling SE edge for the adder. The falling edge is used: it leaves the new count ready while SE is low, which is when the subtractor loads it.
- **Scalable counter width.** K = clog2(L) is used instead of the stated floor(log2(L-M)), which is too narrow to count to L-1.
- **Scalable counter phases.** The 1s/0s phase alternates every L scans.
- **Scalable counter shift register.** It shifts only while SE=1, so exactly the L bits of one scan enter it per scan.
- **Clocking.** Clock enables replace separate clocks; reset is asynchronous, active low, and clears to zero.
- **Controller sequencing.** The initialisation lasts L+1 CLK2 steps. Each scan has one capture cycle, and a flush follows the last one. The interface is a start/done handshake with a seed count.
- **Scan chains and MISR.** Their insides and the MISR input folding are not specified. Standard forms are used.

## Verification

Each module has a self-checking testbench in `tb/` that prints `TB_RESULT checks=N failures=M`:

- `tb_seed_lfsr`: full periods of 2^8-1 and 2^16-1, shift structure.
- `tb_rj_counter`: all three modes, 2L distinct SIC vectors, rotations in circular mode, random comparison against a model.
- `tb_ssic_counter`: the serial code word of every scan over three periods; the shift register; at most one transition per word; 2L distinct words.
- `tb_xor_network`, `tb_xor_grid`: the XOR equations, and that one Johnson bit flip changes exactly one grid row.
- `tb_tpg_ctrl`: exact cycle, step, shift and capture counts for both schemes; restart; `test_len = 0`.
- `tb_scan_chains`, `tb_misr`: comparison against bit-level models; MISR period and detection of a one-bit error.
- `tb_msic_tpg_clock`: every pattern of 4 seeds at the 16 x 16 default, checked against J_r ^ S_c; exactly 16 inputs change per step; the 32 patterns of a seed are distinct; every input is 1 in exactly 16 of them; cycle count.
- `tb_msic_bist_scan`: both generators end to end against a made-up CUT, through `msic_scan_checker`. This reference predicts every scan-in bit, the chain contents at every capture and the final signature. It also checks that the primary inputs hold still while shifting and that the 2L patterns of a seed are distinct. With the Johnson counter it also checks that every scan cell is 1 in exactly L of them.
- `tb_msic_bist_top`: the whole top at its default parameters, all three instances at once, plus a restart. It counts that every mechanism occurs: initialisation, seed step, Johnson step, circular shift, capture, flush, subtractor load, subtractor count-down, 1s/0s phase change, per-clock pattern.
- `tb_transition_density`: measures input transition density in both schemes.
  - Test-per-clock, at the default grid: about 0.068 over 8 seeds, seed changes included; exactly 1/16 inside a seed. A 256-bit pseudorandom source drawn afresh for every pattern gives about 0.50, about 7x more.
  - Test-per-scan (4 x 8 chains): at most two toggles per chain per scan, and a scan-in density of about 0.20, below 2/L = 0.25.

The power figures themselves (total and peak power of the CUT) depend on a gate-level CUT and a power model, and are not reproduced.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/msic_pkg.sv tb/tb_msic_bist_top.sv --top-module tb_msic_bist_top
./obj_dir/Vtb_msic_bist_top
```

`-Wno-fatal` keeps lint warnings (unused observation signals, widths in testbench arithmetic) from stopping the build. Any other testbench runs the same way. The package must come first on the command line; `-y` lets Verilator find the other modules by file name. The simulator starts uninitialised variables at random values, and all state the design reads is reset. Every testbench runs in well under a minute.
