// tb_bssp_workloads: filter orders 2, 8, 32 and 128 (the same order in
// both directions) on the CP-4 processing element, as an IIR filter in blocks
// of 2 pixels and as an FIR filter in blocks of 4 pixels. For each order the
// outputs are checked against the direct difference equation and the
// measured cycles per pixel are checked against T_p = (N+L)(N+1)/L:
//   order 2: 6 (IIR) and 4.5 (FIR); order 8: 45 and 27; order 32: 561 and 297;
//   order 128: 8385 and 4257.
module tb_bssp_workloads;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NO = 4;
  localparam int ORDS [NO] = '{2, 8, 32, 128};
  localparam int TP_IIR [NO] = '{600, 4500, 56100, 838500};
  localparam int TP_FIR [NO] = '{450, 2700, 29700, 425700};

  logic start = 0;
  logic done [NO];
  int c [NO], fl [NO], tpi [NO], tpf [NO];

  for (genvar o = 0; o < NO; o++) begin : g_ord
    pe_order_run #(.ORD(ORDS[o]), .W(8), .H(2)) u_run (
      .clk, .start, .done(done[o]), .checks(c[o]), .failures(fl[o]),
      .tp_iir_x100(tpi[o]), .tp_fir_x100(tpf[o]));
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    int checks = 0, failures = 0;
    #20 start = 1;
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int o = 0; o < NO; o++) begin
      $display("order %0d: T_p IIR (L=2) = %0d.%02d, FIR (L=4) = %0d.%02d cycles/pixel",
               ORDS[o], tpi[o] / 100, tpi[o] % 100, tpf[o] / 100, tpf[o] % 100);
      checks += c[o] + 2;
      failures += fl[o];
      if (tpi[o] != TP_IIR[o]) failures++;
      if (tpf[o] != TP_FIR[o]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
