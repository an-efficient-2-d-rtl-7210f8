// bssp_fifo: first-in first-out buffer with a look-ahead window.
//
// The processors communicate only through buffered FIFOs: this module is the
// row (I/O) buffer that receives the input pixels of a PE and the buffer that
// holds the vertical state variables arriving from the neighbouring PE, and
// also the output row buffer of a PE. The FIFO behaviour is from the
// architecture; the window and the multi-entry pop are this design's way of
// letting a PE read all pixels of a block at once.
//
// Interface: one write per cycle (push when !full). The oldest PEEK entries
// are visible on dout[0..PEEK-1] (dout[0] oldest); pop_n removes 0..PEEK
// entries at the end of the cycle and must not exceed count. DEPTH need not
// be a power of two. count shows the number of entries held.
// Timing: a word pushed in cycle t is visible from cycle t+1. Synchronous
// active-high reset empties the buffer.
module bssp_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 16,
  parameter int unsigned PEEK  = 1
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       push,
  input  T                           din,
  output logic                       full,
  input  logic [$clog2(PEEK+1)-1:0]  pop_n,
  output T                           dout [PEEK],
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T mem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr;

  function automatic logic [AW-1:0] wrap_add(logic [AW-1:0] p, int unsigned n);
    int unsigned s;
    s = int'(p) + n;
    if (s >= DEPTH) s -= DEPTH;
    return AW'(s);
  endfunction

  assign full = (count == ($clog2(DEPTH+1))'(DEPTH));

  always_comb
    for (int i = 0; i < PEEK; i++) dout[i] = mem[wrap_add(rd_ptr, i)];

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push && !full) begin
        mem[wr_ptr] <= din;
        wr_ptr      <= wrap_add(wr_ptr, 1);
      end
      rd_ptr <= wrap_add(rd_ptr, int'(pop_n));
      count  <= count + ($clog2(DEPTH+1))'(push && !full) - ($clog2(DEPTH+1))'(pop_n);
    end
  end

  // A pop may only take entries that are there.
  assert property (@(posedge clk) disable iff (rst) int'(pop_n) <= int'(count));

endmodule
