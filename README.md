# Block state space 2-D filter processor

This RTL filters images with a general 2-D recursive (IIR) or non-recursive
(FIR) filter in real time. It follows the multiprocessor architecture of the
article *An Efficient 2-D Digital Signal Processor Based Upon The Block State
Space Representation*. The filter is the quarter-plane difference equation

    g(m,n) = sum_{i=0..M} sum_{j=0..N} a(i,j) f(m-i,n-j)
           + sum_{(i,j) != (0,0)}      d(i,j) g(m-i,n-j)        d(i,j) = -b(i,j)

Here `m` is the pixel position along a row and `n` is the row. The filter is
not computed directly. It is written in state space form and evaluated in
blocks of L neighbouring pixels. After that rewriting, every equation a
processor has to evaluate has the same shape: at most four products and two
plain additions. One arithmetic unit of that shape (called CP-4 below) then
handles both filter types:

* an IIR filter with blocks of 2 pixels: products with f and with g;
* an FIR filter with blocks of 4 pixels: products with f only.

Rows are dealt out to several identical processors in turn. Only the
"vertical" state variables move between processors, and they move only to
the next processor in a ring. Speed therefore grows almost linearly with the
number of processors.

## State variables

The realisation uses two kinds of state:

* **Horizontal states** `r_k`, with `k = j*M + i` (`0 <= i < M`, `0 <= j <= N`).
  They are the contents of the pixel delays. There are M per filter row `j`,
  chained along the row. They never leave a processor.
* **Vertical states** `q_k` (`0 <= k < N`). They are the contents of the line
  delays: N values per pixel. The row below needs them.

Row `j` of the structure is the chain `r_{jM} .. r_{jM+M-1}`. Row 0 ends in
the output. Row `j >= 1` ends in the adder of `q_{N-j}`. The chain `q_0 ..
q_{N-1}` runs through the line delays into the output. The first element of
each r chain has no predecessor.

The article writes the state equations with modified coefficients
`c = a - a(0,0) b` and `d = -b`, which act on `f` and on `y = g - a(0,0) f`.
This design applies `a` and `d` to `f` and `g` instead. The two forms are
algebraically identical. With this form the output equation also fits the
arithmetic unit.

## Block equations: what one processor computes

Take a block of L pixels at positions `t = 0..L-1` (t = 0 is the oldest),
with filter stages `j = 0..N`. Unrolling the scalar recursion over the block
gives these equations:

    stage j at pixel t:  V_j(t) = sum_{u=0..min(M,t)} [ a(u,j) f(t-u) + d(u,j) g(t-u) ]
                                 + r_{jM+M-1-t}(previous block)      (if M-1-t >= 0)
                                 + q_{N-j-1}(same pixel, row above)  (if j < N)
       V_0 = g (the output),  V_j = q_{N-j} for j >= 1

    r_{jM+i}(block end) = sum_{s=0..min(i,L-1)} [ a(M-i+s,j) f(L-1-s) + d(M-i+s,j) g(L-1-s) ]
                         + r_{jM+i-L}(previous block)                 (if i >= L)

The output stage has no `d(0,0)` term. The state operands from the previous
block are zero in the first block of a row. The inputs from the row above are
zero in the first row of a frame.

Each equation has at most 2L products. In FIR mode the `d` terms vanish, so
it has at most L products. It also has two state operands:

| equation type    | per block | IIR, L=2       | FIR, L=4  |
|------------------|-----------|----------------|-----------|
| output g         | L         | <= 3 products  | <= 4      |
| vertical q       | L*N       | <= 4 products  | <= 4      |
| horizontal r     | M*(N+1)   | <= 4 products  | <= 4      |

A block therefore costs `(M+L)(N+1)` CP-4 evaluations. That is
**T_p = (M+L)(N+1)/L clock cycles per pixel** for one processor.

Sample values of T_p, all checked in simulation:

| order M=N | IIR, L=2 | FIR, L=4 |
|-----------|----------|----------|
| 2         | 6        | 4.5      |
| 8         | 45       | 27       |
| 32        | 561      | 297      |
| 128       | 8385     | 4257     |

The processing element issues the equations of a block in this order:

1. For each pixel t: the output (stage 0), then stages 1..N. Stage 0 writes
   `g(t)`, which the later stages and the later pixels use.
2. The horizontal states, from the highest index down. Each update still
   reads the value `r_{k-L}` left by the previous block.

Vertical states travel in the order `q_{N-1}, q_{N-2}, .., q_0` for each
pixel. A processor consumes the row above's values in exactly the order in
which it produces its own. The link between processors is therefore a plain
FIFO.

## The CP-4 arithmetic unit (`cp4_unit`)

    y = (c0*x0 + c1*x1) + ((c2*x2 + c3*x3) + (u0 + u1))

The unit has four multipliers and five adders. One adder serves each product
pair, one adds the two state operands, one joins the second product pair with
the state sum, and one is the final adder. The unit is combinational. The
processing element registers its result, so the unit completes one equation
per clock.

Operand routing inside the processing element:

* IIR mode: slots 0 and 1 take `a·f` for u = 0, 1. Slots 2 and 3 take `d·g`
  for u = 0, 1.
* FIR mode: all four slots take `a·f`, for u = 0..3.
* Unused slots get a zero coefficient.

## Multiprocessor organisation (`bssp_top`)

    in stream -> input control -> PE 0 -> PE 1 -> ... -> PE NPE-1 --+
                                   ^  (vertical states, FIFO)       |
                                   +--------------------------------+
                 PE outputs -> output control -> out stream

* **Input control** (`bssp_input_ctrl`) sends row `r` to PE `r mod NPE`. It
  tags every pixel with *first row* and *last row* of the frame. The PE that
  handles the first row uses zero vertical inputs. The PE that handles the
  last row sends no vertical states. Consecutive frames therefore need no
  flush. The rotation carries on across frames.
* Each **processing element** (`bssp_pe`) holds these buffers:
  * an input row buffer (W pixels);
  * a vertical state buffer fed by the previous PE (`QDEPTH = 4*N*W` words);
  * an output row buffer (W words);
  * the horizontal state registers (`M(N+1)` words);
  * the coefficient buffer (`a` and `d`, `(M+1)(N+1)` words each).

  A PE issues an equation whenever all of the following hold:
  * the L pixels of its block are present;
  * the vertical state it needs from the row above has arrived;
  * the result has room downstream.

  Otherwise it stalls.
* **Output control** (`bssp_output_ctrl`) reads the rows back in the same
  round-robin order.

A PE can start a row while the PE above is still working on the previous
row. It stalls only if it overtakes its neighbour. With NPE processors the
array sustains one pixel every `T_p/NPE` cycles. For the default 2nd-order
filter with four PEs:

* IIR: 1.5 cycles per pixel. A 512×512 frame took about 395k cycles in
  simulation.
* FIR: 1.125 cycles per pixel.

At 30 frames/s of 512×512 video a pixel arrives every 127 ns. The FIR case
meets this with a 10 MHz clock. The IIR case needs at least 11.8 MHz, or a
fifth PE.

## Number format

These choices are this design's own; the architecture does not fix a word
length.

* Samples, states and outputs are 24-bit two's complement (`bssp_pkg::data_t`).
* Coefficients are 16-bit two's complement with 12 fraction bits (`coef_t`).
* Every product is shifted right by 12 bits (floor) and truncated to 24 bits
  on its own. All sums wrap.

Because products are rounded one by one and addition is modular, the
grouping of the sum does not matter. The hardware therefore reproduces the
direct difference equation (with the same per-product rounding) bit for bit.
The testbenches check against exactly that. Overflow wraps; nothing saturates.

## Interfaces

All blocks use one clock and a synchronous active-high reset `rst`. Streams
use valid/ready handshakes.

| top port | meaning |
|---|---|
| `mode` | `MODE_IIR` (L=2) or `MODE_FIR` (L=4). Change it only between frames, when the PEs are idle. |
| `coef_we, coef_sel, coef_i, coef_j, coef_wdata` | Write `a(i,j)` (`coef_sel=0`) or `d(i,j) = -b(i,j)` (`coef_sel=1`) into every PE. Load the coefficients before a frame. |
| `in_valid, in_ready, in_f` | Input pixels in raster order, H rows of W. |
| `out_valid, out_ready, out_g, out_row_end` | Filtered pixels in raster order. `out_row_end` marks the last pixel of a row. |
| `op_issue, stall_q, stall_out` | Per-PE activity flags, for observation. |

Parameters of `bssp_top`:

| parameter | default | meaning |
|---|---|---|
| `M` | 2 | horizontal filter order |
| `N` | 2 | vertical filter order |
| `W` | 512 | pixels per row |
| `H` | 512 | rows per frame |
| `NPE` | 4 | number of processing elements |

`W` must be a multiple of 4.

## Where this RTL departs from, or goes beyond, the article

* **Clocking.** The article's processors run asynchronously. Here they share
  one clock, and the FIFOs give the same decoupling.
* **Coefficient storage.** The article sizes the coefficient buffer for
  precomputed block matrices. This design stores the scalar `a` and `d`
  values and forms the matrix entries by indexing.
* **Output buffer.** A separate one-row output buffer per PE is this design's
  own addition.
* **Block state equations.** They are derived here by unrolling the scalar
  recursion, not taken from the article's block-matrix notation. The result
  has the same equation counts and operand counts. The article's scalar
  equation for the horizontal states numbers the chains continuously. Its
  signal-flow graph starts a new chain in each filter row. This design
  follows the graph, because only that form reproduces the difference
  equation.
* **Not built.** The alternative primitives the article compares against are
  not part of this design:
  * CP-1 (one multiply-accumulate);
  * CP-2 (one multiplier, two adders);
  * CP-3 (two multipliers, three adders).

  Block sizes 1 and 8 are not supported either.
* **Very high orders.** Orders like 512 are allowed by the parameters but
  impractical as registers. They need about 263k coefficient pairs per PE.
  The coefficient and horizontal-state storage would then have to become
  RAM macros.

## Files and simulation

`rtl/`:

* `bssp_pkg.sv`: types and the product rounding.
* `cp4_unit.sv`: the CP-4 arithmetic unit.
* `bssp_fifo.sv`: the FIFO, with a look-ahead window.
* `bssp_pe.sv`: the processing element.
* `bssp_input_ctrl.sv`, `bssp_output_ctrl.sv`: the input and output control.
* `bssp_top.sv`: the top level.

`tb/` holds one self-checking testbench per block. Each prints
`TB_RESULT checks=… failures=…`.

* `tb_bssp_top` runs three full 512×512 frames (IIR, FIR, IIR) at the
  default parameters. It compares all outputs, checks the frame time, and
  counts stalls and ring transfers.
* `tb_bssp_top_small` runs the same test on a small array: M=3, N=1,
  12×7 frames, three PEs. The orders differ, and each frame starts on a
  different PE.
* `tb_bssp_workloads` (with `pe_order_run`) runs orders 2, 8, 32 and 128 in
  both modes. It checks outputs and measured T_p.
* `tb_bssp_realtime` (with `top_realtime_run`) feeds 512×512 frames at one
  pixel per 1.27 clocks, that is 127 ns pixels on a 100 ns clock, into four
  PEs. The 2nd-order FIR and 1st-order IIR cases must never make the source
  wait. The 2nd-order IIR case (T_p/4 = 1.5 > 1.27) must fall behind.

Run a testbench with Verilator, for example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_bssp_top \
        -y rtl -y tb +libext+.sv rtl/bssp_pkg.sv tb/tb_bssp_top.sv
    ./obj_dir/Vtb_bssp_top

The full-size top test takes a few seconds.
