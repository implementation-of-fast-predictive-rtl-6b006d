# Parallel Lipschitz interpolator for fast learned control laws

A nonlinear model predictive controller (MPC) must solve an optimisation
problem at every sampling instant. That can take tens of milliseconds on a
PC, far too long for a fast plant. This design avoids the solver altogether.
The control law is sampled offline into a data set of N_D pairs
(state w_i, control action f_i). Online, the action for a new state q comes
from **Lipschitz interpolation** over that data set, evaluated in parallel
hardware:

    f(q) = 1/2 * min_i ( f_i + L*||q - w_i||inf )  +  1/2 * max_i ( f_i - L*||q - w_i||inf )
                     \________ ceiling u_i ______/         \_______ floor l_i ________/

Here L is the Lipschitz constant of the law. The difference between the
minimum ceiling and the maximum floor is the *enclosure*, and the estimate
is its midpoint. Each sample's ceiling and floor depend only on that sample
and q, so any number of them can be computed at once. Only subtractions,
absolute values, maxima and comparisons are needed, and even the
multiplication by L disappears if the data set stores f~_i = f_i / L:

    f~(q) = ( min_i (f~_i + d_i) + max_i (f~_i - d_i) ) >> 1,   d_i = max_j |q_j - w_ij|

The caller multiplies the result by L to get the control action.

The default configuration comes from a self-balancing two-wheel robot. It
has 3 state inputs (tilt angle, tilt rate, wheel rate) and 1 output (wheel
acceleration), 14000 samples, L = 4.67, and K = 256 samples processed per
clock. One query takes 57 clocks, which is 855 ns at a 15 ns clock.

## Number format

Every datapath value is 16-bit two's complement Q3.12: 1 sign bit, 3 integer
bits and 12 fractional bits, so one unit is 1/4096 (`li_pkg`). The format
assumes that inputs are scaled to [0, 1] and outputs (already divided by L)
to a comparable range. Then `|f~| + d` stays well inside ±8 and nothing
overflows, so the datapath has no saturation logic. Outside that range the
sums wrap.

The rounding error of the format is at most 2^-13 on each stored value and
up to 2^-12 on a distance. Together with the truncating halving, the
hardware result is within 4·2^-13 ≈ 4.9e-4 of real-valued interpolation on
the unrounded data. In practice it is closer: 3.9e-4 at worst over 2500
random queries.

## Datapath: K lanes, a row at a time, two reduction levels

```
            row addr (FSM)
                 |
  BRAM 0 --> ECAU 0 --\
  BRAM 1 --> ECAU 1 ---+--> comparator tree --> partial-result memory --> comparator tree --> output ALU --> f~
   ...         ...     |    (K inputs)          (one {u,l} per row)       (DEPTH inputs)       (u+l)>>1
  BRAM K-1-> ECAU K-1 -/
                 ^
                 q (latched at start, broadcast to all ECAUs)
```

* **Training BRAMs** (`li_bram`, K instances of DEPTH rows). Sample i of the
  data set lives in BRAM `i % K`, row `i / K`. A word is `{f~, w[2], w[1],
  w[0]}`, 64 bits. The port is single-ported and its read is registered.
* **ECAU** (`li_ecau`, enclosure calculation arithmetic unit, one per lane).
  It is combinational: it forms three 17-bit differences, their absolute
  values and the largest of them (the infinity norm d), then `u = f~ + d`
  and `l = f~ - d`.
* **Row comparator tree** (`li_cmp_tree`, N = K). It is a balanced binary
  tree of `li_cmp` nodes. Each node keeps the smaller ceiling and the larger
  floor. It has log2 K = 8 levels and K−1 = 255 nodes, and is combinational.
* **Partial-result memory** (`li_partial_mem`, DEPTH entries). It stores the
  tree result of each row. All entries are read in parallel, which is why
  it is a register array rather than a block RAM.
* **Final comparator tree** (`li_cmp_tree`, N = DEPTH). It reduces the rows
  of the current query. Rows beyond the query's row count are replaced by
  the neutral enclosure (ceiling = +max, floor = −max), so stale entries from
  an earlier, longer query cannot take part.
* **Output ALU** (`li_out_alu`). It forms the 17-bit sum `u + l` and shifts
  it right arithmetically by one. The result is registered in the top.

When N_D ≤ K the whole data set fits in one row and a query is a single
pass. When N_D > K the scan covers n = ceil(N_D / K) rows, one per clock,
and the second reduction level combines the partial results. The critical
path runs from the BRAM output through the ECAU and 8 comparator levels to
the partial-memory register. The reference implementation closed timing at
15 ns on a Xilinx 7-series device, but that has not been re-checked for
this RTL.

## Controller and timing (`li_fsm`)

The controller is a synchronous Moore machine with four states:

| state | length   | what happens |
|-------|----------|--------------|
| IDLE  | –        | waits for `start`; the load port is open |
| RUN   | n clocks | BRAM row address 0 .. n−1, one per clock, BRAM enable high |
| DRAIN | 1 clock  | last row's data leaves the BRAMs; its row result is written |
| FINAL | 1 clock  | second tree and ALU see all n rows; result captured |

The partial-memory write trails the BRAM read by one clock. That write
enable and address are the read enable and address, delayed by one clock.
An assertion checks that every write follows a read. A query therefore
takes **n + 2 clocks** from the clock edge that samples `start` to the edge
that raises `f_valid`. The bare row scan is n clocks (55 × 15 ns = 825 ns).
The two extra clocks are the registered BRAM read and the output register.

```
clk      _/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_/‾\_
start    ‾‾‾\___________________________      (n = 3)
state     IDLE|RUN |RUN |RUN |DRN |FIN |IDLE
rd_addr        0    1    2
pm_we               row0 row1 row2
f_valid  ___________________________/‾‾‾
```

## Interface of `parallel_li`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; synchronous active-low reset |
| ld_en, ld_bank, ld_addr, ld_data | in | 1, log2 K, log2 DEPTH, 64 | write one sample into BRAM `ld_bank`, row `ld_addr` |
| ld_ready | out | 1 | load port open (controller idle); writes while busy are dropped |
| n_iter | in | log2(DEPTH+1) | rows to scan, n = ceil(N_D / K); 0 runs 1 row, values above DEPTH are clipped |
| start | in | 1 | one-clock request; `q` and `n_iter` are sampled with it; ignored while busy |
| q | in | 3 × 16 | query point (state), Q3.12 |
| busy | out | 1 | high from the clock after start until the result is captured |
| f_valid | out | 1 | `f_out` holds the latest result; cleared by the next start |
| f_out | out | 16 | f~(q), Q3.12; multiply by L for the control action |

Loading a data set whose size is not a multiple of K requires one rule to
be kept: **the unused slots of the last row must hold copies of real
samples**. A duplicate changes neither the minimum nor the maximum, so this
costs no hardware. Rows beyond n are masked automatically.

Parameters: `K` (lanes, default 256) and `DEPTH` (rows, default 55). The
number format and the input count (`DATA_W = 16`, `FRAC_W = 12`, `N_W = 3`)
are constants in `li_pkg`.

## Size

With the defaults the design holds 256 × 55 × 64 = 901,120 bits of training
memory and 55 × 32 bits of partial results. It has 256 ECAUs and 255 + 63
comparator nodes (the 9 padding nodes of the second tree fold away).
Coarse generic synthesis gives about 11,800 word-level cells and 1,850
flip-flop bits. The reference FPGA implementation reports about 175 LUTs
per ECAU and 32 per comparator node. How the 256 small memories map onto
FPGA block or distributed RAM depends on the tool and is not fixed by the
RTL.

## Files

| file | content |
|------|---------|
| `rtl/li_pkg.sv` | number format, `sample_t`, `encl_t`, neutral enclosure |
| `rtl/li_bram.sv` | training-data memory |
| `rtl/li_ecau.sv` | enclosure calculation unit |
| `rtl/li_cmp.sv` | comparator node |
| `rtl/li_cmp_tree.sv` | parameterised comparator tree |
| `rtl/li_partial_mem.sv` | per-row result memory |
| `rtl/li_out_alu.sv` | (u + l) >> 1 |
| `rtl/li_fsm.sv` | controller |
| `rtl/parallel_li.sv` | top level |
| `tb/*_tb.sv` | self-checking testbenches, one per module plus the system tests below |

## Verification

Every testbench checks its results against a model that it computes
itself, prints `TB_RESULT checks=N failures=M`, and has a watchdog.

* Unit tests: `li_ecau_tb`, `li_cmp_tb`, `li_cmp_tree_tb` (256 inputs, and
  13 inputs to exercise padding), `li_out_alu_tb`, `li_bram_tb`,
  `li_partial_mem_tb` and `li_fsm_tb`. The FSM test checks the read and
  write sequences cycle by cycle for every row count.
* `parallel_li_tb`: K = 8, DEPTH = 6. It covers random data sets,
  bit-exact results and n + 2 latency. It counts and requires each of:
  single-row and multi-row scans, a full-depth scan, padded last rows,
  ceiling and floor won in different rows, row-count clipping, and a load
  and a start refused while busy.
* `parallel_li_full_tb`: default size, 14000 / 7000 / 2560 / 256 samples.
* `parallel_li_sweep_tb`: default size, N_D = 1000 … 14000 in steps of 1000.
  It checks latency ceil(N_D/256) + 2 and prints the time per query at
  15 ns: from 90 ns up to 855 ns.
* `parallel_li_accuracy_tb`: default size, 14000 samples of a stand-in
  control law (saturated linear feedback divided by 4.67), with 2500
  queries. Each result must equal the fixed-point model bit-exactly and lie
  within 4·2^-13 of real-valued interpolation.

The robot's real data set is not available, so the system tests use
generated data.

Running one test with Verilator 5:

    verilator --binary --timing --assert -Wall -Wno-fatal --top-module parallel_li_tb \
        -y rtl -y tb +libext+.sv -Irtl rtl/li_pkg.sv tb/parallel_li_tb.sv
    ./obj_dir/Vparallel_li_tb

The full-size tests build in well under a minute and run in seconds.

## Where this RTL makes its own choices

The block structure follows the reference design: K BRAM/ECAU lanes, two
comparator trees with a depth-n partial-result memory between them, an
output ALU computing (u + l) >> 1, and an address-stepping controller.
So do the sizes (K = 256, 55 rows, 16-bit Q3.12, three inputs) and the
one-row-per-clock throughput. The following are this implementation's
own:

* The load port, the start/busy/f_valid handshake and the reset.
* The run-time row count `n_iter` with masking of unused rows, so one build
  serves any N_D up to K × DEPTH. Partial last rows are padded with
  duplicates.
* A synchronous Moore controller with the states above. Its latency is
  n + 2 clocks rather than n.
* A register array for the partial results, so that the second tree can
  read all rows at once. Single-ported, read-registered memories for the
  training data.
* One comparator node handling both the ceiling and the floor. Balanced
  trees padded to a power of two with neutral leaves.
* Wrap-around arithmetic with no overflow detection. The format is sized
  so that scaled inputs cannot overflow.

Not included: the multiplication of the result by L, the offline MPC that
produces the data set, and the plant.
