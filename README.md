# Systolic arrays from dependence-graph projection: FIR, convolution, correlation, 2 x 2 matrix product

A systolic array is a row or grid of small identical processors. Data moves through it one
neighbour per clock, so each word fetched from memory is used by many processors. This RTL builds
the arrays that one mapping method gives for a few signal-processing kernels.

The method works like this. Write the computation as a dependence graph: one node per
multiply-add and one edge per value passed between nodes. Then choose three vectors:

* a **projection vector d**: nodes that differ by d run on the same processor;
* a **processor vector p**: node I runs on processor p^T I;
* a **schedule vector s**: node I runs at time s^T I.

The choice is valid if p^T d = 0 and s^T d != 0. Each graph edge e becomes a link p^T e processors
long that holds s^T e registers. Hardware utilisation is 1/|s^T d|. The source paper searches for
these vectors with an evolutionary program. That search runs at design time in software, so no
RTL exists for it. What is here is the hardware those vectors describe:

| part | module | what it computes |
|---|---|---|
| FIR filter, "Design-1A" | `fir_design1a` (built from `fir_pe`) | y(n) = w0 x(n) + w1 x(n-1) + w2 x(n-2) |
| convolution / correlation | `conv_corr_unit` (built on `fir_design1a`) | full linear convolution or cross-correlation of a stream with a 3-sample sequence |
| matrix product | `matmul_array` (built from `mm_pe`) | C = A B for 2 x 2 matrices |
| everything side by side | `systolic_top` | the three parts above, sharing only clock and reset |

All arithmetic uses signed two's complement integers. Words are 16 bits. Every accumulator has
room for the full sum (2 x 16 bits plus clog2 of the number of terms), so nothing overflows or
saturates.

## The FIR array, Design-1A: inputs broadcast, weights stay, results move

This is the part the source describes most fully, down to the register level.

**Mapping.** Node (i, j) of the graph multiplies sample x(i-j) by weight w(j). Here i is time and
j is the tap. The graph has three edge types:

* weights, (1,0);
* inputs, (0,1);
* results, (1,-1).

The array uses d = (1,0), p^T = (0,1) and s^T = (1,0), so processor j does every node of tap j.
Each edge type maps as follows:

| edge | p^T e | s^T e | meaning in hardware |
|---|---|---|---|
| weight (1,0) | 0 | 1 | a register that feeds back into itself: the weight **stays** |
| input (0,1) | 1 | 0 | a wire with no register: every processor gets the same x(n) in the same cycle (**broadcast**) |
| result (1,-1) | -1 | 1 | one register from processor j to processor j-1: partial results **move** towards processor 0 |

s^T d = 1, so hardware utilisation is 1: every processor works on every sample.

**Structure.** Each processor (`fir_pe`) holds a weight register, a multiplier and an adder. The
result line works like this:

* It starts with a constant 0 at the last processor (w2).
* It passes one delay register between neighbouring processors.
* It leaves processor 0 (w0) with no register after it.

```
 x(n) ----+-----------------+-----------------+
          |                 |                 |
   [w0]--(x)         [w1]--(x)         [w2]--(x)
          |                 |                 |
 y(n) <--(+) <-- [D] <-----(+) <-- [D] <-----(+) <-- 0
```

**Timing.** y(n) comes out combinationally, in the same cycle that x(n) is on the input: latency
is zero cycles and throughput is one result per sample. The register D before processor j holds
w(j+1) x(n-1) + w(j+2) x(n-2) + ... from earlier samples. One pass through the adders completes
the sum. The critical path is one multiplier plus one adder, because every adder input on the
result line comes from a register.

**Controls added here.** The published structure has no loading or pacing signals, so these
were added:

* `x_valid`: a clock enable for the delay registers. With it low, the filter holds its state,
  so samples may arrive at any rate.
* `w_load`: loads all weights in one cycle.
* `clr`: a synchronous clear that empties the delay registers (zero history).

**The one subtlety.** The delay registers hold partial sums, not old samples. After new weights
are loaded without `clr`, the next NTAPS-1 outputs mix old and new weights. Assert `clr` with
`w_load` when a clean start is needed.

`NTAPS` is a parameter with default 3, the tap count of the source. Other values build the same
structure with that many processors.

## Convolution and correlation on the same array

The source only says that the FIR procedure also covers convolution and correlation of two
sequences. `conv_corr_unit` reuses `fir_design1a` unchanged and adds the control around it:

* **Convolution** (`op = OP_CONV`) loads the short sequence h as the weights, w(j) = h(j). It
  gives y(n) = sum_k h(k) x(n-k) for n = 0 .. N+NTAPS-2.
* **Correlation** (`op = OP_CORR`) loads h reversed, w(j) = h(NTAPS-1-j). Output n is then
  r(l) = sum_m h(m) x(m+l) with l = n-(NTAPS-1). So the results cover lags -(NTAPS-1) .. N-1 in
  ascending order. The source gives no definition of correlation; this is the one used here.
* **Flush.** After an accepted `x_last`, the unit feeds NTAPS-1 zeros into the array itself, and
  `x_ready` is low during those cycles. This produces the tail of the result. It also leaves the
  delay registers at zero, so the next sequence can follow at once, with the same h and no clear.
* **Handshake.** `x_valid`/`x_ready`/`x_last` go in and `y_valid`/`y_data`/`y_last` come out. The
  output is registered: each accepted sample or flush step gives its result one cycle later.
  `y_last` comes NTAPS clock edges after the edge that accepted `x_last`. N input samples give
  N+NTAPS-1 results. The output has no back-pressure.
* **Loading h.** `h_load` loads h and `op` and clears the array, which also ends any sequence in
  progress. An assertion flags `h_load` in the same cycle as `x_valid`.

## The 2 x 2 matrix-product array

The source sets up the computation as the regular iterative algorithm

```
a(i,j,k) = a(i,j-1,k)        a travels along j
b(i,j,k) = b(i-1,j,k)        b travels along i
c(i,j,k) = c(i,j,k-1) + a(i,j,k) b(i,j,k)
```

on an (i, j, k) cube of nodes. It leaves the projection and schedule to the evolutionary search
and prints no result. This RTL uses:

* d = (0,0,1);
* p^T = [[1,0,0],[0,1,0]], so processor (i,j) does node line (i,j,·);
* s^T = (1,1,1).

These satisfy p^T d = 0 and s^T d = 1. All three graph edges get s^T e = 1 >= 1 cycle of
computation time. The resulting hardware is the familiar output-stationary array:

* c(i,j) accumulates in processor (i,j) (`mm_pe`).
* a moves one processor right per cycle, and b one processor down.
* Row i receives a(i,k) at step i+k, and column j receives b(k,j) at step j+k, so a(i,k) meets
  b(k,j) in processor (i,j) at step i+j+k.
* Operands outside the matrices are fed as zeros.

**Sequencer and timing.** The sequencer in `matmul_array` works as follows:

* `start` (ignored while `busy`) copies A and B into operand registers and clears the
  accumulators.
* The 3N-2 steps (4 for N = 2) run on the next 3N-2 clock edges.
* `done` pulses after the edge of the last step, 3N-2 edges after the edge that sampled `start`.
* `c_mat` stays valid until the next start.

`N` is a parameter with default 2, the size the source treats.

## Departures from the source and choices made here

Taken from the source:

* the Design-1A structure: broadcast input, stationary weights, one delay per hop on the result
  line, zero entering at the w2 end, output at the w0 end with no register;
* the 3-tap size and the FIR equation;
* the matrix recurrence and the 2 x 2 size;
* the use of the FIR array for convolution and correlation.

Chosen here:

* the 16-bit word length and the accumulator widths;
* the asynchronous active-low reset `rst_n`, which clears every register;
* the load, clear and clock-enable ports of the FIR array;
* the whole control and handshake of `conv_corr_unit`, and the correlation lag convention;
* the matrix-array vectors d, p and s, its skewed operand feed, the operand registers and the
  start/busy/done sequencer.

Results in the source's edge table: the table lists the result edge as (1,1). The text and the
mapped values (p^T e = -1, s^T e = 1) both fit only (1,-1), so this RTL uses (1,-1).

Not built:

* the evolutionary vector search, a design-time software program;
* the memory that feeds the arrays, which the source names only to illustrate the systolic
  principle. The arrays bring their operand and result ports out instead.

Lint gives one notice: `rst_n` is used both as an asynchronous reset and in the `disable iff`
of the assertions. This is intended.

## Files

* `rtl/systolic_pkg.sv`: default word length, accumulator-width function, `seq_op_e`.
* `rtl/fir_pe.sv`, `rtl/fir_design1a.sv`: the FIR processor and array.
* `rtl/conv_corr_unit.sv`: convolution / correlation unit.
* `rtl/mm_pe.sv`, `rtl/matmul_array.sv`: the matrix processor and array.
* `rtl/systolic_top.sv`: top level.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each computes the expected
  results from the defining equations, not from the structure.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends. A watchdog stops it and
counts a failure if it hangs. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/systolic_pkg.sv tb/tb_systolic_top.sv \
          --top-module tb_systolic_top
./obj_dir/Vtb_systolic_top
```

What each testbench covers:

* **`tb_systolic_top`** runs all three parts at the same time at their default sizes. It
  counts each mechanism and fails if one never happens:
  * FIR sample gaps, clears and weight reloads;
  * convolution and correlation sequences, and flush stalls;
  * matrix products, and `start` pulses ignored while busy.
* **`tb_fir_design1a`** also replays the small 5-sample example, w = (1,2,3), x = 1..5, which
  gives 1, 4, 10, 16, 22.
* **`tb_matmul_array`** checks [1 2; 3 4] x [5 6; 7 8] = [19 22; 43 50] and the `done` timing.
* **`tb_conv_corr_unit`** checks the y_last timing and that `x_ready` is low for exactly
  NTAPS-1 cycles.

To try other sizes, override `NTAPS`, `N` or `DATA_W` on the modules. The testbenches of the
single blocks declare these as local parameters at the top. Besides the defaults, two other
sizes have been simulated and pass:

* `tb_conv_corr_unit` with NTAPS = 1 and 5;
* `tb_matmul_array` with N = 3 and 4.
