// tb_bssp_output_ctrl: self-checking test of the output control block. Each
// modelled PE holds a queue of output samples tagged with their row and
// column and offers them at random. The block must emit row after row in
// raster order, taking row r from PE r mod NPE, mark the last pixel of each
// row, and pop only the PE it reads from.
module tb_bssp_output_ctrl;
  import bssp_pkg::*;
  localparam int NPE = 3, W = 4, ROWS = 10;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic g_valid [NPE];
  data_t g_data [NPE];
  logic g_pop [NPE];
  logic out_valid, out_ready, out_row_end;
  data_t out_g;
  data_t pq [NPE][$];
  int checks = 0, failures = 0, n_wait = 0;

  bssp_output_ctrl #(.NPE(NPE), .W(W)) dut (
    .clk, .rst, .g_valid, .g_data, .g_pop, .out_valid, .out_ready, .out_g, .out_row_end);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < W; c++) pq[r % NPE].push_back(data_t'(r * 100 + c));
    out_ready = 0;
    for (int p = 0; p < NPE; p++) begin g_valid[p] = 0; g_data[p] = '0; end
    repeat (2) @(negedge clk);
    rst = 0;
    while (k < ROWS * W) begin
      @(negedge clk);
      // a PE offers its head sample only some of the time
      for (int p = 0; p < NPE; p++) begin
        g_valid[p] = (pq[p].size() > 0) && ($urandom_range(0, 2) != 0);
        g_data[p]  = (pq[p].size() > 0) ? pq[p][0] : '0;
      end
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (!out_valid) n_wait++;
      for (int p = 0; p < NPE; p++) begin
        checks++;
        if (g_pop[p] !== (out_valid && out_ready && p == (k / W) % NPE)) begin
          failures++; $display("sample %0d: pop[%0d]=%0d", k, p, g_pop[p]);
        end
      end
      if (out_valid && out_ready) begin
        checks++;
        if (out_g !== data_t'((k / W) * 100 + k % W) || out_row_end !== (k % W == W - 1)) begin
          failures++; $display("sample %0d: got %0d row_end %0d", k, out_g, out_row_end);
        end
      end
      @(posedge clk);
      for (int p = 0; p < NPE; p++) if (g_pop[p]) void'(pq[p].pop_front());
      if (out_valid && out_ready) k++;
    end
    checks++;
    if (n_wait == 0) begin failures++; $display("output never waited for a PE"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
