// pe_order_run: test harness used by tb_bssp_workloads. It runs one
// processing element of filter order ORD x ORD (q output looped back to its
// own input) over a small frame, once as an IIR filter (block size 2) and
// once as an FIR filter (block size 4), compares every output with the
// direct difference equation and measures the busy cycles per pixel, which
// must equal T_p = (ORD+L)(ORD+1)/L. It raises done when finished and reports
// its check and failure counts and the measured T_p values (x100).
module pe_order_run
  import bssp_pkg::*;
#(
  parameter int ORD = 2,
  parameter int W   = 8,
  parameter int H   = 3
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   tp_iir_x100,
  output int   tp_fir_x100
);
  localparam int M = ORD, N = ORD;

  logic rst;
  filt_mode_e mode;
  logic coef_we, coef_sel;
  logic [$clog2(M+1)-1:0] coef_i;
  logic [$clog2(N+1)-1:0] coef_j;
  coef_t coef_wdata;
  logic pix_push, pix_full, q_push, q_full, g_valid, g_pop;
  pix_t pix_in;
  data_t q_data, g_data;
  logic op_issue, stall_q, stall_out;

  bssp_pe #(.M(M), .N(N), .W(W)) dut (
    .clk, .rst, .mode, .coef_we, .coef_sel, .coef_i, .coef_j, .coef_wdata,
    .pix_push, .pix_in, .pix_full,
    .q_in_push(q_push), .q_in_data(q_data), .q_in_full(q_full),
    .q_out_push(q_push), .q_out_data(q_data), .q_out_full(q_full),
    .g_valid, .g_data, .g_pop, .op_issue, .stall_q, .stall_out);

  coef_t a [M+1][N+1];
  coef_t d [M+1][N+1];
  data_t f [H][W];
  data_t g [H][W];

  task automatic run(input bit fir, output int tp_x100);
    int px, orow, ocol, cyc, first, last;
    mode = fir ? MODE_FIR : MODE_IIR;
    for (int i = 0; i <= M; i++)
      for (int jj = 0; jj <= N; jj++) begin
        a[i][jj] = coef_t'($signed($urandom_range(0, 8191)) - 4096);
        d[i][jj] = fir ? '0 : coef_t'($signed($urandom_range(0, 4095)) - 2048);
        @(negedge clk);
        coef_we = 1; coef_sel = 0; coef_wdata = a[i][jj];
        coef_i = ($clog2(M+1))'(i); coef_j = ($clog2(N+1))'(jj);
        @(negedge clk);
        coef_sel = 1; coef_wdata = d[i][jj];
      end
    @(negedge clk); coef_we = 0;
    for (int n = 0; n < H; n++)
      for (int m = 0; m < W; m++) f[n][m] = data_t'($urandom_range(0, 255));
    for (int n = 0; n < H; n++)
      for (int m = 0; m < W; m++) begin
        data_t acc = '0;
        for (int i = 0; i <= M; i++)
          for (int jj = 0; jj <= N; jj++)
            if (m - i >= 0 && n - jj >= 0) begin
              acc += scaled_mul(a[i][jj], f[n-jj][m-i]);
              if (!fir && (i + jj) > 0) acc += scaled_mul(d[i][jj], g[n-jj][m-i]);
            end
        g[n][m] = acc;
      end
    px = 0; orow = 0; ocol = 0; cyc = 0; first = -1; last = 0;
    while (orow < H || cyc < last + 4) begin
      @(negedge clk);
      cyc++;
      pix_push = (px < H * W) && !pix_full;
      pix_in = (px < H * W) ? '{first_row: (px / W == 0), last_row: (px / W == H - 1),
                                f: f[px / W][px % W]} : '0;
      g_pop = g_valid;
      if (g_pop) begin
        checks++;
        if (g_data !== g[orow][ocol]) begin
          failures++;
          if (failures < 5) $display("order %0d: row %0d col %0d got %0d want %0d",
                                     ORD, orow, ocol, g_data, g[orow][ocol]);
        end
        if (++ocol == W) begin ocol = 0; orow++; end
      end
      if (op_issue) begin
        if (first < 0) first = cyc;
        last = cyc;
      end
      @(posedge clk);
      if (pix_push) px++;
    end
    @(negedge clk); pix_push = 0; g_pop = 0;
    tp_x100 = (last - first + 1) * 100 / (H * W);
  endtask

  initial begin
    rst = 1; done = 0; checks = 0; failures = 0; tp_iir_x100 = 0; tp_fir_x100 = 0;
    mode = MODE_IIR; coef_we = 0; coef_sel = 0; coef_i = '0; coef_j = '0; coef_wdata = '0;
    pix_push = 0; pix_in = '0; g_pop = 0;
    wait (start);
    repeat (3) @(negedge clk);
    rst = 0;
    run(0, tp_iir_x100);
    run(1, tp_fir_x100);
    checks += 2;
    if (tp_iir_x100 != (M + L_IIR) * (N + 1) * 100 / L_IIR) failures++;
    if (tp_fir_x100 != (M + L_FIR) * (N + 1) * 100 / L_FIR) failures++;
    done = 1;
  end
endmodule
