// top_realtime_run: test harness used by tb_bssp_realtime. It feeds one
// 512 x 512 frame into a four-PE bssp_top at a fixed video rate: with a
// 100 ns clock and a pixel every 127 ns, pixel k is offered at cycle
// ceil(1.27 k). A real-time source cannot wait, so every cycle in which a due
// pixel is not accepted is counted as an overrun (the pixel is then sent late
// and the schedule slips). All outputs are compared with the direct
// difference equation. Reports checks, failures, overruns and total cycles.
module top_realtime_run
  import bssp_pkg::*;
#(
  parameter int M   = 2,
  parameter int N   = 2,
  parameter bit FIR = 1'b1
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   overruns,
  output int   cycles
);
  localparam int W = 512, H = 512;

  logic rst;
  filt_mode_e mode;
  logic coef_we, coef_sel;
  logic [$clog2(M+1)-1:0] coef_i;
  logic [$clog2(N+1)-1:0] coef_j;
  coef_t coef_wdata;
  logic in_valid, in_ready, out_valid, out_ready, out_row_end;
  data_t in_f, out_g;
  logic [3:0] op_issue, stall_q, stall_out;

  bssp_top #(.M(M), .N(N), .W(W), .H(H), .NPE(4)) dut (
    .clk, .rst, .mode, .coef_we, .coef_sel, .coef_i, .coef_j, .coef_wdata,
    .in_valid, .in_ready, .in_f, .out_valid, .out_ready, .out_g, .out_row_end,
    .op_issue, .stall_q, .stall_out);

  coef_t a [M+1][N+1];
  coef_t d [M+1][N+1];
  data_t f [H][W];
  data_t g [H][W];

  initial begin
    int px, orow, ocol, cyc;
    bit accept;
    rst = 1; done = 0; checks = 0; failures = 0; overruns = 0; cycles = 0;
    mode = FIR ? MODE_FIR : MODE_IIR;
    coef_we = 0; coef_sel = 0; coef_i = '0; coef_j = '0; coef_wdata = '0;
    in_valid = 0; in_f = '0; out_ready = 1;
    wait (start);
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i <= M; i++)
      for (int jj = 0; jj <= N; jj++) begin
        a[i][jj] = coef_t'($signed($urandom_range(0, 8191)) - 4096);
        d[i][jj] = FIR ? '0 : coef_t'($signed($urandom_range(0, 4095)) - 2048);
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
        data_t acc;
        acc = '0;
        for (int i = 0; i <= M; i++)
          for (int jj = 0; jj <= N; jj++)
            if (m - i >= 0 && n - jj >= 0) begin
              acc += scaled_mul(a[i][jj], f[n-jj][m-i]);
              if (!FIR && (i + jj) > 0) acc += scaled_mul(d[i][jj], g[n-jj][m-i]);
            end
        g[n][m] = acc;
      end
    px = 0; orow = 0; ocol = 0; cyc = 0;
    while (orow < H) begin
      @(negedge clk);
      cyc++;
      // pixel px is due once 100*cyc >= 127*px
      in_valid = (px < H * W) && (100 * cyc >= 127 * px);
      in_f = (px < H * W) ? f[px / W][px % W] : '0;
      if (in_valid && !in_ready) overruns++;
      if (out_valid) begin
        checks++;
        if (out_g !== g[orow][ocol]) begin
          failures++;
          if (failures < 5) $display("M=%0d N=%0d fir=%0d: row %0d col %0d got %0d want %0d",
                                     M, N, FIR, orow, ocol, out_g, g[orow][ocol]);
        end
        if (++ocol == W) begin ocol = 0; orow++; end
      end
      accept = in_valid && in_ready;
      @(posedge clk);
      if (accept) px++;
    end
    cycles = cyc;
    done = 1;
  end
endmodule
