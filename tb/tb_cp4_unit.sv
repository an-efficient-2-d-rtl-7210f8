// tb_cp4_unit: self-checking test of the CP-4 primitive. Random coefficients,
// data and state operands (including extreme values) are applied and the
// result is compared with a sum of scaled products computed here in 64-bit
// arithmetic and reduced to the data width.
module tb_cp4_unit;
  import bssp_pkg::*;

  coef_t c [NMUL];
  data_t x [NMUL];
  data_t u [2];
  data_t y;
  int checks = 0, failures = 0;

  cp4_unit dut (.c, .x, .u, .y);

  function automatic data_t model();
    longint acc = 0;
    for (int i = 0; i < NMUL; i++)
      acc += (longint'(c[i]) * longint'(x[i])) >>> COEF_FRAC;
    acc += longint'(u[0]) + longint'(u[1]);
    return data_t'(acc);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      for (int i = 0; i < NMUL; i++) begin
        c[i] = coef_t'($urandom);
        x[i] = data_t'($urandom);
        if (it % 7 == 0) c[i] = (i % 2) ? coef_t'(1 << (COEF_W - 1)) : coef_t'((1 << (COEF_W - 1)) - 1);
        if (it % 11 == 0) x[i] = data_t'(1 << (DATA_W - 1));
      end
      u[0] = data_t'($urandom);
      u[1] = data_t'($urandom);
      #1;
      checks++;
      if (y !== model()) begin
        failures++;
        if (failures < 10) $display("iteration %0d: got %0d want %0d", it, y, model());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
