# Hybrid X-masking / X-canceling output response compactor

Scan test compresses the responses of a circuit into a MISR signature. A single
unknown (X) bit, such as a bit from uninitialised memory or a floating bus,
corrupts that signature. There are two common ways to deal with X's, and each
has a high cost in control data:

* **X-masking** forces X bits to a constant before they reach the MISR. Done
  naively, it needs one control bit per scan cell per pattern.
* **X-canceling** lets X's into the MISR. The tester then XORs together
  groups of MISR bits whose X dependences cancel out. Each group needs an
  m-bit control word, and the number of groups grows with the number of X's.

This design uses both. Most X's are masked. The few that slip through are
cancelled. The masking is cheap because the masks are shared between
patterns. In practice X's cluster: the same scan cells capture X's in many
patterns. So the tester groups the patterns into **partitions** whose X's fall
on the same cells. It loads **one mask per partition**, and every pattern of
that partition reuses it. A cell is masked only if it is X in *every* pattern
of its partition. A known bit is therefore never masked, and fault coverage
is kept.

Total control data for a test:

    bits = N_CHAINS * CHAIN_LEN * partitions  +  M * Q * ceil(leaked X's / (M - Q))

The first term is the mask loads. The second term is the selection words:
each halt of the MISR handles up to M-Q X's with Q words of M bits. More
partitions mask more X's but cost more mask bits. The tester keeps splitting
the patterns while the total drops (see "Generating the control data").

## Datapath

```
 scan_out[N_CHAINS] ──►[ xmask_gates ]──masked──►[ misr (M stages) ]──state──►[ xcancel_xor ]──► xfree_bit
                            ▲  mask column              ▲ en / clear                ▲ sel (M bits)
                      [ mask_buffer ]◄── chan_in        │                           │
                            ▲ raddr/waddr/we            │                        chan_in
                      [ hybrid_ctrl ]───────────────────┘ scan_shift, misr_clear
```

| module | what it is |
|---|---|
| `xhybrid_top` | Top level: wires the blocks below. The scan chains belong to the circuit under test. Their outputs come in on `scan_out`, and `scan_shift` is their shift enable. |
| `hybrid_ctrl` | State machine with four states: idle, load a mask, shift a pattern, cancel. It addresses the mask buffer, halts the shift and clears the MISR. |
| `mask_buffer` | `CHAIN_LEN` words of `N_CHAINS` bits. Word k is the mask for the k-th bit to leave every chain (k = 0 is the cell next to scan-out). Synchronous write, asynchronous read. |
| `xmask_gates` | One AND gate per chain. A control bit of 1 forces the chain's bit to 0. |
| `misr` | An MISR with internal XOR feedback, described below. |
| `xcancel_xor` | `xfree = ^(misr_state & sel)`: the XOR of the MISR bits the tester selects. |
| `xh_pkg` | Default sizes and the controller state type. |

### The MISR

Each stage takes the next stage's value XOR its input. Stage 1 (bit 0) is
the output end. It feeds back into every stage whose `FB_TAPS` bit is set,
and the last stage is always tapped. With `M = 6` and
`FB_TAPS = 6'b110110` it is the textbook 6-stage example. Shift in six chains
of three cells holding O2..O17 and X1..X4, with the first-out cells
X1, O2, O3, X2, O5, O6. The stages then hold:

    M1 = X1^O3^O8^O13          M4 = X1^O6^O11^O16
    M2 = X1^O2^X2^X3^O9^O14    M5 = X1^O2^X3^O12^O17
    M3 = O2^O5^X3^O10^O15      M6 = O2^X3^X4

Gaussian elimination over the X columns shows that `M1^M3^M5` and `M1^M4`
contain no X. The selection words are `6'b010101` and `6'b001001` (bit 0 =
M1), and they are the two X-free outputs. `tb_misr` and `tb_xcancel_xor`
check exactly this.

The 32-stage default uses the polynomial x^32+x^22+x^2+x+1
(`FB_TAPS = 32'hE000_0200`). In general, FB_TAPS bit i is the coefficient
of x^(M-1-i). If there are more chains than stages, chain k enters stage
k mod M.

## Operating protocol

Everything is driven by the tester through three command inputs and the
`chan_in` channels. `load_start` and `pat_start` are accepted only when
`busy` is low. An assertion in `hybrid_ctrl` flags any violation.

| command | cycles | what happens |
|---|---|---|
| `load_start` in cycle t | t+1 … t+CHAIN_LEN | Mask column k (`chan_in[N_CHAINS-1:0]`) is written in cycle t+1+k. `load_done` pulses on the last write. |
| `pat_start` in cycle t | CHAIN_LEN shift cycles from t+1 | `scan_shift` is high. The chains' bits pass the gates into the MISR. `pat_done` pulses on the last shift. |
| `cancel_req` (idle or in a shift cycle) | exactly Q | The shift stops. In cycle j of the halt, `chan_in[M-1:0]` is selection word j and `xfree_bit` is its result (`xfree_valid` high). The cycle of `cancel_req` is cycle 0. The MISR is cleared at the end of cycle Q-1. Then the controller resumes where it was. |

A halt requested in a shift cycle replaces that shift. The interrupted
pattern continues at the same bit position afterwards. A pattern therefore
takes `CHAIN_LEN + Q * halts` cycles, and loading a partition's mask takes
`CHAIN_LEN` cycles.

The hardware never sees which bits are X: X is a property of the response,
known only to the test generator. The tester must:

1. Send the patterns grouped by partition. Load the partition's mask before
   its first pattern.
2. Track how many unmasked X's have entered the MISR since the last clear. Raise
   `cancel_req` before the shift that would take that count above M-Q.
3. At each halt, send Q words that select X-free combinations of the MISR
   bits, found by Gaussian elimination of the MISR's symbolic X dependence.
4. Halt once more at the end of the test for the final X-free bits.

The MISR is not cleared between patterns, only by a halt, so one
X-canceling window can span several patterns.

## Generating the control data

The partitions are computed offline. The end-to-end testbench
(`tb/xh_harness.sv`) contains a reference implementation, which works as
follows:

* For a partition P, count for each cell the patterns of P in which it is X.
* Ignore cells with count 0 and cells that are X in all of P. The latter are
  already masked.
* Among the remaining cells, take the count shared by the largest number of
  cells, at least two. On a tie, take the larger count. The first such cell in
  chain order is the *selected cell*. Shared counts hint that the same
  patterns produce those X's.
* Split P into the patterns where the selected cell is X and those where it
  is not.
* In each round, split every partition that has a selected cell. Keep the
  round only if it lowers the total control data. Otherwise stop.

On the 8-pattern, 5-chain × 3-cell example with M = 10 and Q = 2, the costs
go 85 → 60 → 58 and then 70. The process stops with three partitions
{2,3,7,8}, {1,4,5} and {6}. These mask 23 of the 28 X's, and 45 mask bits
replace the 120 of per-pattern masking. With Q = 1 the costs are
47 → 44 → 51, so the first round is kept.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `M` | 32 | MISR stages |
| `Q` | 7 | X-free combinations per halt |
| `CHANNELS` | 32 | tester channel width (`chan_in`) |
| `N_CHAINS` | 32 | scan chains |
| `CHAIN_LEN` | 15783 | longest chain; 32 × 15783 = 505,056 cells |
| `FB_TAPS` | `32'hE000_0200` | MISR feedback taps |

M = 32, Q = 7 and 32 channels are the configuration the scheme was evaluated
with. The chain count and length are choices of this design. They were sized
so that the largest evaluated circuit, 505,050 scan cells, fits one mask
buffer. The smaller evaluated circuits, 36,075 and 97,643 cells, fit as
well. Requirements: `N_CHAINS <= CHANNELS`, `M <= CHANNELS`, `Q < M`.

The mask buffer holds 505,056 bits, which is by far the largest part of the
design. In silicon it would be an SRAM macro. The RTL writes it as a plain
array.

## Design choices not fixed by the scheme

* **Mask storage.** The scheme only says that control bits are shared within
  a partition. Storing a whole mask on chip, loaded once per partition over
  the channels, is this design's way of sharing them.
* **Mask polarity.** A 1 means "mask", and the AND gate sees the inverted bit.
* **Clearing the MISR after each halt.** Each window then starts empty and
  holds at most M-Q X's. This matches the halt count of
  (X's)/(M-Q) that the cost formula assumes.
* **Command timing.** There is one cycle of latency for load and shift. A
  halt starts in the same cycle as `cancel_req`. Reset is asynchronous and
  active-low.
* **Polynomial and chain folding.** The 32-bit polynomial and the chain k →
  stage k mod M mapping are assumptions.
* **Not built.** The per-cycle X-masking and X-canceling-only baselines are
  not part of the design. Neither is a shadow-register variant, which would
  avoid the halts at the cost of extra channels.

## Verification

Every module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=… failures=…` line:

| testbench | checks |
|---|---|
| `tb_xmask_gates` | Random data and masks. |
| `tb_mask_buffer` | Write, read back, and no write without `we`. |
| `tb_misr` | The 6-stage symbolic example above, one symbol at a time. The 32-stage register against a model with random data, enable and clear. |
| `tb_xcancel_xor` | The two X-free combinations of the example. Random parity. |
| `tb_hybrid_ctrl` | Cycle-exact load, shift and halt sequences. Pattern length is `CHAIN_LEN + Q*halts`. |
| `tb_xhybrid_top` | End to end (below). |
| `tb_xhybrid_full` | End to end at the default parameters: partitioning, a 15783-column mask load, 6 patterns of 15783 shifts with halts inside them, and the final halt. |
| `tb_xhybrid_workloads` | Three circuit-sized runs. Each partitions 3000 patterns, then loads 4 partitions and unloads one pattern from each (below). |

The end-to-end tests run two copies of the design. The copies see the same
known bits, but every X cell gets independent random values in each copy.
Every X-free bit from both copies must equal the value computed from the
known bits alone. That checks masking, MISR, clearing and canceling together.
The tests also check that only X cells are ever masked. `tb_xhybrid_top`
runs three cases: the 8-pattern example with Q = 2 and Q = 1, comparing the
partitions, costs and masks with the values above, and a random workload of
24 patterns with correlated X's that forces halts inside patterns.

### Circuit-sized workloads

`tb_xhybrid_workloads` builds synthetic X maps the size of three industrial
circuits: 505,050, 36,075 and 97,643 scan cells, with X-densities of about
0.05 %, 2.75 % and 2.4 %. All use 32 chains, M = 32 and Q = 7. X-capturing
cells come in groups of 177 that share a pattern set, and each cell is X in
a given pattern with 25 % probability. This profile was measured on a real
36,075-cell circuit: about 3,900 X cells, with 177 cells sharing the same 406
of 3000 patterns. The test partitions all 3000 patterns, then simulates one
pattern from each of the first four partitions. It reports:

| circuit | partitions | control bits | vs. masking only | vs. canceling only | test time, hybrid / canceling only |
|---|---|---|---|---|---|
| 505k cells, 0.05 % | 4 | 6.92 M | 219× | 1.04× | 1.00 / 1.00 |
| 36k cells, 2.6 % | 64 | 20.5 M | 5.3× | 1.22× | 1.17 / 1.23 |
| 98k cells, 2.3 % | 16 | 57.1 M | 5.1× | 1.05× | 1.19 / 1.20 |

Test time is relative to the shift cycles alone. A halt costs Q cycles per
M-Q leaked X's. The gains depend entirely on how strongly the X's correlate
across patterns. These synthetic maps correlate less than real designs
reportedly do, where a 2× gain over canceling alone has been seen. The
test therefore checks only that the hybrid scheme never needs more control
data than either method alone, and that the hardware produces correct X-free
bits at these sizes.

Simulating with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/xh_pkg.sv tb/tb_xhybrid_top.sv --top-module tb_xhybrid_top
./obj_dir/Vtb_xhybrid_top
```

Each block testbench builds the same way with its own top module. The
full-size test simulates about 111,000 cycles in well under a second.

## Limits

* The full-size test runs 6 patterns, not a complete 3000-pattern test. The
  hardware has no pattern-count limit, because patterns are streamed.
* The partitioning and Gaussian elimination are testbench code. They are
  there to generate and check control data, not as a production tool.
* The 32-bit polynomial is assumed. Masking and canceling work with any
  polynomial, since the tester derives the selection words from whatever
  feedback the MISR has.
