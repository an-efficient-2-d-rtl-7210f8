// cp4_unit: the CP-4 computational primitive, four multiplications and five
// additions, evaluated in one clock cycle.
//
//   y = (c0*x0 + c1*x1) + ((c2*x2 + c3*x3) + (u0 + u1))
//
// The adder tree has the shape of the CP-4 primitive: one adder per pair of
// products, one adder for the two state inputs u0/u1, one adder joining the
// second product pair with the state pair, and a final adder. One CP-4
// evaluation covers the most complex state equation (a vertical state) of a
// 2-D IIR filter processed in blocks of two pixels, or of a 2-D FIR filter in
// blocks of four pixels.
//
// Each product is scaled by bssp_pkg::scaled_mul (fraction bits dropped,
// floor rounding, DATA_W bits kept); the additions wrap. These number-format
// details are this design's own choice.
//
// Timing: purely combinational; the processing element registers the result,
// so one primitive is completed per clock.
module cp4_unit
  import bssp_pkg::*;
(
  input  coef_t c [NMUL],  // coefficients
  input  data_t x [NMUL],  // data operands (input samples or outputs)
  input  data_t u [2],     // state operands added without multiplication
  output data_t y
);

  data_t p [NMUL];
  data_t s_m01, s_m23, s_u, s_m23u;

  always_comb begin
    for (int i = 0; i < NMUL; i++) p[i] = scaled_mul(c[i], x[i]);
    s_m01  = p[0] + p[1];
    s_m23  = p[2] + p[3];
    s_u    = u[0] + u[1];
    s_m23u = s_m23 + s_u;
    y      = s_m01 + s_m23u;
  end

endmodule
