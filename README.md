# Deterministic scan-BIST for field testing

Safety-critical and high-availability systems are often tested in the field,
during start-up, shutdown, or short idle windows. A conventional scan-BIST
loads pseudorandom LFSR patterns into the scan chains. It needs so many
patterns to reach high fault coverage that a test does not fit into a short
idle window. This design applies a small precomputed **deterministic** test
set instead: the compact ATPG test set `T_D` of the circuit under test (CUT),
which has complete stuck-at coverage. Nothing is stored in a memory. The
patterns are hard-wired into the output logic of a finite-state machine, and
synthesis folds them into ordinary gates. The BIST runs on its own: a start
pulse begins a session and a signature comes out at the end.

Optional extensions of the same architecture are also included:

* **Partitioned test sets** (`K > 1`). A large `T_D` is split into `K`
  smaller FSMs, and a `K:1` multiplexer picks the active one.
* **Mixed mode** (`mixed_mode = 1`). Pseudorandom patterns from an LFSR are
  applied first. The deterministic patterns follow, through a 2:1
  multiplexer.
* **Several scan chains** (`CHAINS > 1`). All chains load in parallel, one
  BGL output per chain. The default is a single chain.

## Block diagram

```
                     +---------------- pattern source ----------------+
  position counter   |  pattern FSM 1 (counter + BGL) --+             |
  (modulo N, in the -+> ...                             +-> K:1 mux --+--> 2:1 mux --> scan chain --> signature
   BIST controller)  |  pattern FSM K (counter + BGL) --+             |      ^         (N cells)     register
                     +------------------------------------------------+      |          ^   |
                                                     LFSR (mixed mode) ------+          |   v
                                                                                  cut_d  cut_q
                                                                             (circuit under test)
```

## How a session runs

One session applies every pattern exactly once. For each pattern:

1. **Shift, N cycles.** `scan_en = 1`. The position counter steps from 0 to
   N-1, and on each cycle the pattern source supplies the bit for that
   position. The previous pattern's response leaves through scan-out at the
   same time and goes into the signature register.
2. **Capture, 1 cycle.** `scan_en = 0`. The scan cells load the CUT's
   response (`cut_d`) in one functional clock. The pattern FSM steps to its
   next state.

So `P` patterns take exactly `P*(N+1)` cycles from the first shift to the
last capture. At the default size (N = 611, M = 94) that is 94 x 612 = 57,528
cycles. The same `m*(n+1)` rule gives the test lengths quoted for the other
benchmark circuits in the evaluation of this architecture.

After the last capture, the design spends **N flush cycles** shifting the last
response into the signature register, and then raises `done`. The flush is a
choice of this RTL, and the `m*(n+1)` figure does not include it. During the
flush the cyclic FSM has already returned to its first state, so the chain is
left holding pattern 1.

The signature register is kept off during the first shift phase, because the
chain then still holds whatever it held before the test.

```
cycle:    0        1 .. N       N+1      N+2 .. 2N+1   ...  P(N+1)   P(N+1)+1 .. P(N+1)+N   next
phase:  IDLE+start  SHIFT p0    CAPTURE   SHIFT p1           CAPTURE  FLUSH                   DONE
comp_en:   0          0           0         1                  0       1                      0
```

## The pattern FSM and the bit generation logic

This is the heart of the design (`pattern_fsm`, `bgl`). The FSM has one state
per test pattern, S_1 .. S_M. It stays in a state for the N shift cycles of
that pattern, then moves to the next, and from S_M back to S_1 (a ring). It
is a Mealy machine: its output, the scan-in bit, depends on the state *and*
on the position counter, which is an input to it. The state register is
simply a modulo-M counter, which is why the structure is described as a
"pattern counter merged with the bit generation logic (BGL)".

The BGL is a constant lookup, `bit = TEST_SET[state][N-1-pos]`. A synthesis
tool turns this into two-level logic, and its cost grows with the size of the
test set. That is why the architecture relies on compact test sets, and why
partitioning exists.

**Test-set layout.** `TEST_SET` is an unpacked array of M patterns of N bits:
`TEST_SET[i][c]` is the value scan cell `c` must hold when pattern `i` is
applied. Cell 0 is next to scan-in and cell N-1 drives scan-out. The chain
shifts from cell 0 towards cell N-1, so the bit shifted in at position `p`
ends up in cell `N-1-p`. The BGL applies that reversal, so you write patterns
in cell order.

**Supplying a real test set.** No particular circuit's test set is part of
this RTL. By default `TEST_SET` is a fixed pseudo-random stand-in, generated
by `td_default()` in `rtl/sbist_td_default.svh`: bit `c` of pattern `i` is
bit `c mod 32` of `sbist_pkg::td_word(SEED, i, c div 32)`, a 32-bit integer
hash. To use the ATPG test set of your circuit, override the parameter:

```systemverilog
localparam logic [610:0] MY_TD [94] = '{ 611'h..., 611'h..., ... };
scan_bist_top #(.N(611), .M(94), .TEST_SET(MY_TD)) u_bist (...);
```

Don't-care bits in the ATPG patterns can be filled with any value. Filling
them so the logic is small is a synthesis matter and is not done here. The
patterns are applied in order S_1..S_M. Pattern order does not affect fault
coverage, so a synthesis flow may re-encode the states freely.

## Partitioned test sets (`K`)

With `K > 1`, `partitioned_pattern_gen` splits the M patterns into `K`
groups. The first `K-1` groups hold `ceil(M/K)` patterns each, and the last
group holds the rest. Each group gets its own `pattern_fsm`. All of them read
the one shared position counter. A modulo-K group counter drives the select
of the `K:1` multiplexer and steps when the active group finishes its last
pattern. Only the active group's FSM advances. The patterns are still
applied in the order 0..M-1, so the signature does not depend on `K`. With
`K = 1` this module is exactly the single-FSM architecture. The
configuration that was synthesized with partitioning used 371 patterns in 25
groups.

## Mixed mode

When `mixed_mode` is 1 at start, the controller first applies `NUM_PR`
pseudorandom patterns. Each one is N bits from `lfsr_prpg`, followed by a
capture. The controller then switches the 2:1 multiplexer to the pattern
FSM and applies the M deterministic patterns. The point is that the
pseudorandom patterns catch the easy faults, so the deterministic set only
has to cover the random-pattern-resistant ones, and the FSM shrinks. When
you build for mixed mode, supply that smaller "hard-fault" test set as
`TEST_SET`. The LFSR is a 32-bit internal-XOR register with the primitive
polynomial x^32+x^22+x^2+x+1 and seed `32'hACE12468`. Like the 2^20 default
of `NUM_PR`, these are choices of this RTL.

## Several scan chains (`CHAINS`)

The architecture is laid out for one chain and is said to extend directly to
several. This RTL does that extension in the simplest way:

* Each pattern holds `CHAINS*N` bits. `TEST_SET[i][j*N + c]` is cell `c` of
  chain `j`.
* The BGL produces `CHAINS` bits per cycle, and all chains shift together,
  so a pattern still takes N+1 cycles.
* `cut_q`/`cut_d` are `CHAINS*N` wide, with chain `j` at `[j*N +: N]`.
* The signature register becomes a `CHAINS`-input MISR, with bit `j` taken
  from chain `j`.
* In mixed mode, chain 0 takes the LFSR output and chain `j` takes LFSR
  stage `PRPG_W-1-j*(PRPG_W/CHAINS)`. There is no phase shifter, so the
  chains' pseudorandom streams are shifted copies of each other.

## Response compaction

`signature_register` is a 32-bit serial signature register. On each enabled
clock it shifts left, feeds back the MSB through x^32+x^22+x^2+x+1, and
XORs the scan-out bit into bit 0. After L bits the signature is the
remainder of `sum d_k x^(L-1-k)` modulo that polynomial. With `NUM_IN > 1`
it becomes a MISR for several chains. The architecture only asks for a
compactor large enough to make aliasing very unlikely, which here is about
2^-32. Comparing the signature with the fault-free value is left to the
system: simulate the fault-free circuit, or read the signature once from a
known-good part.

## Top-level interface (`scan_bist_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (controller and counters) |
| `start` | in | 1 | starts a session; sampled in IDLE or DONE |
| `mixed_mode` | in | 1 | at start: apply `NUM_PR` pseudorandom patterns first |
| `busy` | out | 1 | high from the first shift to the end of the flush |
| `done` | out | 1 | high after a session until the next start; `signature` is valid |
| `signature` | out | SIG_W | response signature |
| `cut_q` | out | CHAINS*N | scan-cell outputs, to the CUT's combinational logic |
| `cut_d` | in | CHAINS*N | CUT's next-state values, loaded when `scan_en = 0` |
| `scan_en` | out | 1 | 1 while shifting |
| `capture` | out | 1 | the capture cycle of each pattern |
| `use_prpg` | out | 1 | 1 while the LFSR feeds the chain |
| `position`, `pattern`, `group`, `pr_count`, `phase` | out | | observation: position counter, pattern index, partition, pseudorandom count, controller state |

The scan chain sits inside the top as `scan_chain` (mux-D cells). In a real
full-scan circuit these are the CUT's own flip-flops, and `cut_q`/`cut_d` are
its state outputs and next-state inputs. Outside a session the chain is in
functional mode and loads `cut_d` on every clock.

## Parameters

| parameter | default | origin |
|---|---|---|
| `N` | 611 | scan-chain length of the s15850 benchmark |
| `M` | 94 | size of the compact s15850 test set |
| `CHAINS` | 1 | single scan chain, as in the architecture as laid out |
| `K` | 1 | single FSM; 25 was used for the largest (371-pattern) set |
| `NUM_PR` | 1048576 | "typically 1M" pseudorandom patterns in mixed mode; 2^20 is this RTL's reading |
| `SIG_W`, `PRPG_W` | 32 | this RTL's choice |
| `SEED` | 1 | seed of the stand-in test set |
| `TEST_SET` | stand-in | replace with the ATPG test set |

Other benchmark configurations that were evaluated, as `(N, M)`:
s35932 (1763, 12), s38417 (1664, 68), s38584 (1464, 110), CKT1 (282, 45),
and CKT2 (862, 371, K = 25). The mixed-mode ones, as `(N, NUM_PR, M)`:
s13207 (700, 64K, 17), s15850 (611, 1M, 65), s38417 (1664, 2M, 26), and
s38584 (1464, 64K, 50). The chain length and test set are fixed when the
design is built, so each circuit needs its own parameter set.

## Files

| file | contents |
|---|---|
| `rtl/sbist_pkg.sv` | controller state enum, polynomial, width helper, stand-in hash |
| `rtl/sbist_td_default.svh` | `td_default()` stand-in test set (included in modules that take `TEST_SET`) |
| `rtl/mod_counter.sv` | modulo counter: position, pattern, group and pseudorandom counters |
| `rtl/bgl.sv` | bit generation logic |
| `rtl/pattern_fsm.sv` | pattern counter + BGL |
| `rtl/partitioned_pattern_gen.sv` | K pattern FSMs + K:1 mux |
| `rtl/lfsr_prpg.sv` | pseudorandom source |
| `rtl/scan_chain.sv` | scan chain |
| `rtl/signature_register.sv` | response compactor |
| `rtl/bist_controller.sv` | session sequencing, contains the position counter |
| `rtl/scan_bist_top.sv` | top level |

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog. The
end-to-end checker is `tb/sbist_top_harness.sv`. It attaches a small
combinational stand-in CUT, and a reference model written separately from the
RTL predicts every applied pattern, every response, the scan-out order and
the signature. It checks:

* the chain contents on every capture cycle;
* the `P*(N+1)` test length;
* the signature.

It also counts each mechanism, and fails if one never occurs: shift,
capture, FSM step, S_M to S_1 wrap, partition switch, pseudorandom phase,
LFSR-to-BGL switch, flush.

| testbench | configuration |
|---|---|
| `tb_scan_bist_top` | N=13/M=7/K=3; N=9/M=5 on 3 chains; N=7/M=10/K=2 on 2 chains (all with mixed mode); N=6/M=371/K=25 |
| `tb_scan_bist_full` | `scan_bist_top` with all defaults (611 x 94), two deterministic sessions |
| `tb_table1_circuits` | the five other benchmark configurations at full size, deterministic |
| `tb_table3_mixed_mode` | the four mixed-mode configurations, with `NUM_PR` cut to 16 |

Mixed mode was never simulated at its real pseudorandom lengths. At 64K to
2M patterns those runs need 4.6e7 to 3.3e9 cycles. The largest mixed-mode
run used 16 pseudorandom patterns.

Running a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/sbist_pkg.sv tb/tb_scan_bist_full.sv --top-module tb_scan_bist_full
./obj_dir/Vtb_scan_bist_full
```

## Where this RTL goes beyond or departs from the architecture

* **Test sets.** The real ATPG test sets are not included. Every default and
  every simulation uses the hashed stand-in, so no fault coverage or area
  figure of the original evaluation can be reproduced with this RTL as it
  is.
* **The CUT.** The circuit under test is not included. The testbenches use a
  small combinational stand-in.
* **Control choices.** The start/busy/done handshake, the final flush, the
  gating of the compactor during the first load, and the reset behaviour are
  this design's own.
* **Partitioning.** The group counter that drives the K:1 mux, and the
  uneven last group when K does not divide M, are this design's own.
* **Mixed mode.** It is a run-time input here. In the architecture it is a
  build-time strategy whose FSM holds only the hard-fault patterns. Set `M`
  and `TEST_SET` accordingly.
* **LFSR and compactor.** Their widths, polynomials and seeds are this
  design's own.
* **Multi-chain layout.** The architecture does not detail its
  multi-chain extension. The layout described above, the MISR, and the LFSR
  taps are this design's own.
* **Baseline.** The conventional STUMPS scheme with a phase shifter serves
  only as the baseline and is not implemented.
