// tb_bssp_top_small: the end-to-end test of tb_bssp_top on a small array
// with unequal orders (M=3 horizontal, N=1 vertical), 12 x 7 frames and three
// processors, so that the frame height is not a multiple of the number of
// processors and each new frame starts on a different PE.
//
// Three frames go through the filter back to back: IIR, FIR (block size 4)
// and IIR again, so the mode switch happens in both directions. Random gaps
// on the input stream and a stretch of output back-pressure at the start of
// each frame exercise the FIFO handshakes; the input gaps are rare enough that
// the PEs, not the source, set the pace. Every output sample is compared
// with the direct 2-D difference equation computed here (same per-product
// rounding). The test also counts that each mechanism occurred: stalls on
// missing vertical states, stalls on a full output buffer, input stalls,
// vertical states handed round the ring from the last PE to PE 0, and both
// filter modes; and it checks that a frame takes no more cycles than the
// round-robin schedule allows (T_p = (M+L)(N+1)/L cycles per pixel per PE).
module tb_bssp_top_small;
  import bssp_pkg::*;

  localparam int M = 3, N = 1, W = 12, H = 7, NPE = 3, HOLD = 60;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  filt_mode_e mode;
  logic coef_we, coef_sel;
  logic [$clog2(M+1)-1:0] coef_i;
  logic [$clog2(N+1)-1:0] coef_j;
  coef_t coef_wdata;
  logic in_valid, in_ready, out_valid, out_ready, out_row_end;
  data_t in_f, out_g;
  logic [NPE-1:0] op_issue, stall_q, stall_out;

  bssp_top #(.M(M), .N(N), .W(W), .H(H), .NPE(NPE)) dut (
    .clk, .rst, .mode, .coef_we, .coef_sel, .coef_i, .coef_j, .coef_wdata,
    .in_valid, .in_ready, .in_f, .out_valid, .out_ready, .out_g, .out_row_end,
    .op_issue, .stall_q, .stall_out);

  coef_t a [M+1][N+1];
  coef_t d [M+1][N+1];
  data_t f [H][W];
  data_t g [H][W];
  int checks = 0, failures = 0;
  int n_stall_q = 0, n_stall_out = 0, n_in_stall = 0, n_ring = 0, n_iir = 0, n_fir = 0;

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
        @(negedge clk);
        coef_we = 1; coef_sel = 0; coef_wdata = a[i][jj];
        coef_i = ($clog2(M+1))'(i); coef_j = ($clog2(N+1))'(jj);
        @(negedge clk);
        coef_sel = 1; coef_wdata = d[i][jj];
      end
    @(negedge clk); coef_we = 0;
  endtask

  task automatic run_frame(input bit fir);
    int px, orow, ocol, cyc, L, bound;
    bit accept;
    mode = fir ? MODE_FIR : MODE_IIR;
    if (fir) n_fir++; else n_iir++;
    for (int n = 0; n < H; n++)
      for (int m = 0; m < W; m++) f[n][m] = data_t'($urandom_range(0, 255));
    reference(fir);
    px = 0; orow = 0; ocol = 0; cyc = 0;
    while (orow < H) begin
      @(negedge clk);
      cyc++;
      in_valid = (px < H * W) && ($urandom_range(0, 15) != 0);
      in_f = (px < H * W) ? f[px / W][px % W] : '0;
      out_ready = (cyc > HOLD);
      if (in_valid && !in_ready) n_in_stall++;
      n_stall_q += $countones(stall_q);
      n_stall_out += $countones(stall_out);
      if (dut.q_push[NPE-1]) n_ring++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_g !== g[orow][ocol] || out_row_end !== (ocol == W - 1)) begin
          failures++;
          if (failures < 10) $display("frame mode %0d row %0d col %0d: got %0d want %0d",
                                      fir, orow, ocol, out_g, g[orow][ocol]);
        end
        if (++ocol == W) begin ocol = 0; orow++; end
      end
      accept = in_valid && in_ready;
      @(posedge clk);
      if (accept) px++;
    end
    // each PE handles at most ceil(H/NPE)+1 rows' worth of time, plus the
    // initial output hold
    L = fir ? L_FIR : L_IIR;
    bound = HOLD + ((H + NPE - 1) / NPE + 1) * (W / L) * (M + L) * (N + 1);
    checks++;
    if (cyc > bound) begin
      failures++; $display("frame took %0d cycles, bound %0d", cyc, bound);
    end
    $display("frame (mode %0d): %0d cycles for %0d pixels", fir, cyc, H * W);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = MODE_IIR; coef_we = 0; coef_sel = 0; coef_i = '0; coef_j = '0; coef_wdata = '0;
    in_valid = 0; in_f = '0; out_ready = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    load_coefs(0);
    run_frame(0);
    load_coefs(1);
    run_frame(1);
    load_coefs(0);
    run_frame(0);
    load_coefs(1);
    run_frame(1);
    $display("events: stall_q=%0d stall_out=%0d in_stall=%0d ring=%0d iir=%0d fir=%0d",
             n_stall_q, n_stall_out, n_in_stall, n_ring, n_iir, n_fir);
    checks += 6;
    if (n_stall_q == 0)   begin failures++; $display("no PE ever waited for vertical states"); end
    if (n_stall_out == 0) begin failures++; $display("no output back-pressure stall"); end
    if (n_in_stall == 0)  begin failures++; $display("no input stall"); end
    if (n_ring == 0)      begin failures++; $display("no vertical state crossed the ring"); end
    if (n_iir < 2)        begin failures++; $display("IIR mode not run twice"); end
    if (n_fir == 0)       begin failures++; $display("FIR mode never run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
