// tb_bssp_pe: self-checking test of one processing element.
//
// The PE's q output is looped back to its own q input, so a single PE filters
// a whole frame row after row. The expected outputs come from the direct 2-D
// difference equation evaluated in the testbench (same per-product rounding),
// not from the state space form. Three frames are run: IIR (block size 2)
// with free-running output, FIR (block size 4) with random output
// back-pressure, and IIR again after the mode switch back. For the first frame
// the number of issued equations and the busy cycles are checked against
// (M+L)(N+1) cycles per block of L pixels.
module tb_bssp_pe;
  import bssp_pkg::*;

  localparam int M = 2, N = 2, W = 8, H = 5;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  filt_mode_e mode;
  logic coef_we, coef_sel;
  logic [$clog2(M+1)-1:0] coef_i;
  logic [$clog2(N+1)-1:0] coef_j;
  coef_t coef_wdata;
  logic pix_push, pix_full;
  pix_t pix_in;
  logic q_push, q_full;
  data_t q_data;
  logic g_valid, g_pop;
  data_t g_data;
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
  int checks = 0, failures = 0;
  int n_issue, n_stall_out, n_stall_q;

  // direct form: g(m,n) = sum a f + sum d g, each product rounded on its own
  task automatic reference(input bit fir);
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
  endtask

  task automatic load_coefs(input bit fir);
    for (int i = 0; i <= M; i++)
      for (int jj = 0; jj <= N; jj++) begin
        a[i][jj] = coef_t'($signed($urandom_range(0, 8191)) - 4096);
        d[i][jj] = fir ? '0 : coef_t'($signed($urandom_range(0, 4095)) - 2048);
        for (bit sel = 0; ; sel = 1) begin
          @(negedge clk);
          coef_we = 1; coef_sel = sel;
          coef_i = ($clog2(M+1))'(i); coef_j = ($clog2(N+1))'(jj);
          coef_wdata = sel ? coef_t'($signed($urandom_range(0, 4095)) - 2048) : a[i][jj];
          // FIR mode must ignore whatever is in the feedback buffer
          if (sel && !fir) coef_wdata = d[i][jj];
          if (sel) break;
        end
      end
    @(negedge clk); coef_we = 0;
  endtask

  task automatic run_frame(input bit fir, input bit backpressure);
    int px, out_r, out_c, first_issue, last_issue, cyc;
    mode = fir ? MODE_FIR : MODE_IIR;
    for (int n = 0; n < H; n++)
      for (int m = 0; m < W; m++) f[n][m] = data_t'($urandom_range(0, 255));
    reference(fir);
    px = 0; out_r = 0; out_c = 0; first_issue = -1; last_issue = 0; cyc = 0;
    n_issue = 0;
    while (out_r < H) begin
      @(negedge clk);
      cyc++;
      pix_push = (px < H * W) && !pix_full;
      if (px < H * W) pix_in = '{first_row: (px / W == 0), last_row: (px / W == H - 1),
                                 f: f[px / W][px % W]};
      g_pop = g_valid && (!backpressure || (cyc > 200 && $urandom_range(0, 1) == 0));
      if (g_pop) begin
        checks++;
        if (g_data !== g[out_r][out_c]) begin
          failures++;
          if (failures < 10) $display("mismatch row %0d col %0d: got %0d want %0d",
                                      out_r, out_c, g_data, g[out_r][out_c]);
        end
        if (++out_c == W) begin out_c = 0; out_r++; end
      end
      if (op_issue) begin
        n_issue++;
        if (first_issue < 0) first_issue = cyc;
        last_issue = cyc;
      end
      if (stall_out) n_stall_out++;
      if (stall_q) n_stall_q++;
      @(posedge clk);
      if (pix_push) px++;
    end
    @(negedge clk); pix_push = 0; g_pop = 0;
    // let the horizontal updates of the last block finish
    repeat (40) begin
      cyc++;
      if (op_issue) begin n_issue++; last_issue = cyc; end
      @(negedge clk);
    end
    if (!backpressure) begin
      int L = fir ? L_FIR : L_IIR;
      int expect_ops = H * (W / L) * (M + L) * (N + 1);
      checks++;
      if (n_issue != expect_ops) begin
        failures++; $display("issued %0d equations, expected %0d", n_issue, expect_ops);
      end
      checks++;
      if (last_issue - first_issue + 1 != expect_ops) begin
        failures++; $display("busy for %0d cycles, expected %0d", last_issue - first_issue + 1, expect_ops);
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = MODE_IIR; coef_we = 0; coef_sel = 0; coef_i = '0; coef_j = '0; coef_wdata = '0;
    pix_push = 0; pix_in = '0; g_pop = 0; n_stall_out = 0; n_stall_q = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    load_coefs(0);
    run_frame(0, 0);
    load_coefs(1);
    run_frame(1, 1);
    load_coefs(0);
    run_frame(0, 1);
    checks++;
    if (n_stall_out == 0) begin failures++; $display("output back-pressure never stalled the PE"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
