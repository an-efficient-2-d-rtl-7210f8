// bssp_pe: one processor of the multiprocessor 2-D filter. It filters whole
// rows of an image with a general order M x N quarter-plane 2-D IIR or FIR
// filter,
//   g(m,n) = sum_{i,j} a(i,j) f(m-i,n-j) + sum_{(i,j)!=(0,0)} d(i,j) g(m-i,n-j),
// with d(i,j) = -b(i,j), using the block state space form and a single CP-4
// arithmetic unit that completes one state equation per clock.
//
// State variables (as in the state space realisation of the filter):
//   horizontal states r_k, k = j*M + i (0<=i<M, 0<=j<=N): kept inside the PE
//     in the horizontal state buffer (M*(N+1) words), updated once per block;
//   vertical states q_k (0<=k<N): one set per pixel; the values of the row
//     above arrive in the q input FIFO from the neighbouring PE, and the
//     values of this row leave through q_out towards the next PE.
// With m counting pixels along a row and stage j (0..N), the equations are
//   stage 0 (output) g(m)   = sum_u [a(u,0) f(m-u) + d(u,0) g(m-u)] + r_{M-1-t} + q_{N-1}(m,n-1)
//   stage j (j>=1) q_{N-j}(m) = sum_u [a(u,j) f(m-u) + d(u,j) g(m-u)] + r_{jM+M-1-t} + q_{N-j-1}(m,n-1)
//   r_{jM+i}(end of block) = sum_s [a(M-i+s,j) f(end-s) + d(M-i+s,j) g(end-s)] + r_{jM+i-L}
// where a block holds L pixels, t is the position of pixel m inside the block,
// u runs over 0..min(M,t), s over 0..min(i,L-1), the r terms are the values
// left by the previous block (zero at the start of a row, and dropped when
// the index is out of range) and the q term is dropped for stage N and for the
// first row of a frame. Every equation then needs at most 2L products and two
// state operands, which is exactly one CP-4 evaluation for an IIR filter with
// L = 2 (products with f and g) and for an FIR filter with L = 4 (products
// with f only). Per block of L pixels the PE issues L*(N+1) output/vertical
// equations and M*(N+1) horizontal equations, so one pixel costs
// (M+L)(N+1)/L cycles.
//
// The equations are the block state space equations of the architecture with
// the feedback coefficient applied to g instead of to y = g - a(0,0) f (the
// two are algebraically the same: c f + d y = a f - b g); the issue order,
// handshakes and buffer organisation are this design's own choices.
//
// Interfaces:
//   coef_*  : write a(i,j) (coef_sel=0) or d(i,j) = -b(i,j) (coef_sel=1).
//   pix_*   : push input pixels (with first/last-row flags) into the row buffer.
//   q_in_*  : push vertical states from the previous PE (order per pixel:
//             q_{N-1} .. q_0).
//   q_out_* : vertical states of this row, same order; held while q_out_full.
//   g_*     : output samples, popped by the output control block.
// Timing: an equation issues in a cycle when its operands are present and
// its result has room; the result is registered at the end of that cycle.
module bssp_pe
  import bssp_pkg::*;
#(
  parameter int unsigned M      = 2,            // horizontal order
  parameter int unsigned N      = 2,            // vertical order
  parameter int unsigned W      = 512,          // pixels per row
  parameter int unsigned QDEPTH = L_FIR * N * W, // vertical state buffer (words)
  parameter int unsigned ODEPTH = W             // output row buffer (words)
) (
  input  logic       clk,
  input  logic       rst,
  input  filt_mode_e mode,
  // coefficient buffer
  input  logic       coef_we,
  input  logic       coef_sel,
  input  logic [$clog2(M+1)-1:0] coef_i,
  input  logic [$clog2(N+1)-1:0] coef_j,
  input  coef_t      coef_wdata,
  // input pixels
  input  logic       pix_push,
  input  pix_t       pix_in,
  output logic       pix_full,
  // vertical states from the previous PE
  input  logic       q_in_push,
  input  data_t      q_in_data,
  output logic       q_in_full,
  // vertical states to the next PE
  output logic       q_out_push,
  output data_t      q_out_data,
  input  logic       q_out_full,
  // output samples
  output logic       g_valid,
  output data_t      g_data,
  input  logic       g_pop,
  // activity, for observation
  output logic       op_issue,    // an equation was computed this cycle
  output logic       stall_q,     // waiting for vertical states from above
  output logic       stall_out    // waiting for room in an output buffer
);

  localparam int unsigned NR   = M * (N + 1);          // horizontal states
  localparam int unsigned NC   = (M + 1) * (N + 1);    // coefficients per set
  localparam int unsigned LMAX = L_FIR;
  localparam int unsigned NBLK_IIR = W / L_IIR;
  localparam int unsigned NBLK_FIR = W / L_FIR;

  typedef enum logic {PH_V, PH_H} phase_e;   // output/vertical, horizontal

  // ---------------------------------------------------------------- buffers
  coef_t a_coef [NC];   // coefficient buffer, feed-forward a(i,j)
  coef_t d_coef [NC];   // coefficient buffer, feedback d(i,j) = -b(i,j)
  data_t hs     [NR];   // horizontal state buffer
  data_t gblk   [LMAX]; // outputs of the current block

  pix_t  in_win [LMAX];
  logic [$clog2(W+1)-1:0]      in_count;
  logic [$clog2(LMAX+1)-1:0]   in_pop;
  data_t q_head [1];
  logic [$clog2(QDEPTH+1)-1:0] q_count;
  logic                        q_pop;
  logic                        g_full;
  data_t                       g_head [1];
  logic [$clog2(ODEPTH+1)-1:0] g_count;

  bssp_fifo #(.T(pix_t), .DEPTH(W), .PEEK(LMAX)) u_row_buf (
    .clk, .rst, .push(pix_push), .din(pix_in), .full(pix_full),
    .pop_n(in_pop), .dout(in_win), .count(in_count));

  bssp_fifo #(.T(data_t), .DEPTH(QDEPTH), .PEEK(1)) u_q_buf (
    .clk, .rst, .push(q_in_push), .din(q_in_data), .full(q_in_full),
    .pop_n(q_pop), .dout(q_head), .count(q_count));

  // ------------------------------------------------------------ sequencer
  phase_e phase;
  logic [1:0] t;                          // pixel within block (V phase)
  logic [$clog2(N+1)-1:0] j;              // stage (V phase)
  logic [$clog2(NR+1)-1:0] k;             // horizontal state index (H phase)
  logic [$clog2(M+1)-1:0]  hi;            // k mod M
  logic [$clog2(N+1)-1:0]  hj;            // k div M
  logic [$clog2(NBLK_IIR+1)-1:0] blk;     // block index within the row

  int unsigned L;
  logic  row_start, first_row, last_row, in_ok, need_q, emit_g, emit_q, go;
  coef_t cp_c [NMUL];
  data_t cp_x [NMUL];
  data_t cp_u [2];
  data_t cp_y;

  always_comb begin
    L         = (mode == MODE_FIR) ? L_FIR : L_IIR;
    row_start = (blk == '0);
    first_row = in_win[0].first_row;
    last_row  = in_win[0].last_row;
    in_ok     = int'(in_count) >= L;
    need_q    = (phase == PH_V) && (int'(j) < N) && !first_row;
    emit_g    = (phase == PH_V) && (j == '0);
    emit_q    = (phase == PH_V) && (j != '0) && !last_row;
    stall_q   = in_ok && need_q && (q_count == '0);
    stall_out = in_ok && ((emit_g && g_full) || (emit_q && q_out_full));
    go        = in_ok && !stall_q && !stall_out;

    // operand selection for the CP-4 unit
    for (int s = 0; s < NMUL; s++) begin
      int unsigned uu, cidx, didx;
      logic isg, valid;
      cp_c[s] = '0;
      cp_x[s] = '0;
      if (mode == MODE_FIR) begin
        uu  = s;
        isg = 1'b0;
      end else begin
        uu  = s % 2;
        isg = (s >= 2);
      end
      if (phase == PH_V) begin
        // stage j at pixel t: products with pixel t-uu
        valid = (uu <= int'(t)) && (uu <= M) && !(isg && uu == 0 && j == '0);
        cidx  = int'(j) * (M + 1) + uu;
        didx  = int'(t) - uu;
      end else begin
        // horizontal state (hj, hi) at the last pixel of the block
        valid = (uu <= int'(hi)) && (uu < L);
        cidx  = int'(hj) * (M + 1) + (M - int'(hi) + uu);
        didx  = L - 1 - uu;
      end
      if (valid) begin
        cp_c[s] = isg ? d_coef[cidx] : a_coef[cidx];
        cp_x[s] = isg ? gblk[didx] : in_win[didx].f;
      end
    end

    cp_u[0] = '0;
    cp_u[1] = '0;
    if (phase == PH_V) begin
      if (int'(t) <= M - 1 && !row_start) cp_u[0] = hs[int'(j) * M + M - 1 - int'(t)];
      if (need_q) cp_u[1] = q_head[0];
    end else begin
      if (int'(hi) >= L && !row_start) cp_u[0] = hs[int'(k) - L];
    end

    q_pop      = go && need_q;
    in_pop     = '0;
    if (go && phase == PH_H && k == '0) in_pop = ($clog2(LMAX+1))'(L);
    q_out_push = go && emit_q;
    q_out_data = cp_y;
    op_issue   = go;
  end

  cp4_unit u_cp4 (.c(cp_c), .x(cp_x), .u(cp_u), .y(cp_y));

  bssp_fifo #(.T(data_t), .DEPTH(ODEPTH), .PEEK(1)) u_out_buf (
    .clk, .rst, .push(go && emit_g), .din(cp_y), .full(g_full),
    .pop_n(g_pop && g_valid), .dout(g_head), .count(g_count));

  assign g_valid = (g_count != '0);
  assign g_data  = g_head[0];

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= PH_V;
      t     <= '0;
      j     <= '0;
      k     <= ($clog2(NR+1))'(NR - 1);
      hi    <= ($clog2(M+1))'(M - 1);
      hj    <= ($clog2(N+1))'(N);
      blk   <= '0;
      for (int c = 0; c < NC; c++) begin
        a_coef[c] <= '0;
        d_coef[c] <= '0;
      end
    end else begin
      if (coef_we) begin
        if (coef_sel) d_coef[int'(coef_j) * (M + 1) + int'(coef_i)] <= coef_wdata;
        else          a_coef[int'(coef_j) * (M + 1) + int'(coef_i)] <= coef_wdata;
      end
      if (go) begin
        if (phase == PH_V) begin
          if (j == '0) gblk[t] <= cp_y;
          if (int'(j) == N) begin
            j <= '0;
            if (int'(t) == L - 1) begin
              t     <= '0;
              phase <= PH_H;
            end else begin
              t <= t + 2'd1;
            end
          end else begin
            j <= j + 1'b1;
          end
        end else begin
          hs[k] <= cp_y;
          if (k == '0) begin
            k     <= ($clog2(NR+1))'(NR - 1);
            hi    <= ($clog2(M+1))'(M - 1);
            hj    <= ($clog2(N+1))'(N);
            phase <= PH_V;
            if (int'(blk) == ((mode == MODE_FIR) ? NBLK_FIR : NBLK_IIR) - 1) blk <= '0;
            else blk <= blk + 1'b1;
          end else begin
            k <= k - 1'b1;
            if (hi == '0) begin
              hi <= ($clog2(M+1))'(M - 1);
              hj <= hj - 1'b1;
            end else begin
              hi <= hi - 1'b1;
            end
          end
        end
      end
    end
  end

  // The block size follows the mode, so the mode may only change while the
  // PE stands at the start of a row with no block in progress.
  assert property (@(posedge clk) disable iff (rst)
    $changed(mode) |-> (blk == '0 && phase == PH_V && t == '0 && j == '0));

  // The row length must be a whole number of blocks in both modes.
  initial assert (W % L_FIR == 0) else $error("W must be a multiple of %0d", L_FIR);

endmodule
