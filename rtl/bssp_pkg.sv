// bssp_pkg: shared widths, types and arithmetic helpers of the block state
// space 2-D filter processor.
//
// Number format (this design's choice): samples, outputs and state variables
// are DATA_W-bit two's-complement words; coefficients are COEF_W-bit
// two's-complement with COEF_FRAC fraction bits. Every product is shifted
// right (floor) by COEF_FRAC and truncated to DATA_W bits before it is added,
// and all sums wrap modulo 2^DATA_W. Because each product is rounded on its
// own and addition is modular, the result does not depend on the order or
// grouping of the additions: the block state space evaluation gives bit for
// bit the same outputs as the direct difference equation with the same
// per-product rounding.
package bssp_pkg;

  localparam int unsigned DATA_W    = 24;  // sample / state word
  localparam int unsigned COEF_W    = 16;  // coefficient word
  localparam int unsigned COEF_FRAC = 12;  // fraction bits of a coefficient
  localparam int unsigned NMUL      = 4;   // multipliers of the CP-4 primitive
  localparam int unsigned L_IIR     = 2;   // block size used for IIR filtering
  localparam int unsigned L_FIR     = 4;   // block size used for FIR filtering

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [COEF_W-1:0] coef_t;

  // Filter type, selected at run time. Both use the same CP-4 primitive:
  // IIR with blocks of 2 pixels, FIR with blocks of 4 pixels.
  typedef enum logic {MODE_IIR = 1'b0, MODE_FIR = 1'b1} filt_mode_e;

  // One pixel as it travels from the input control block to a PE.
  typedef struct packed {
    logic  first_row;  // row 0 of a frame: vertical states from above are zero
    logic  last_row;   // last row of a frame: no vertical states are sent on
    data_t f;          // input sample f(m,n)
  } pix_t;

  // Scaled product: floor((c * x) / 2^COEF_FRAC), truncated to DATA_W bits.
  function automatic data_t scaled_mul(coef_t c, data_t x);
    logic signed [DATA_W+COEF_W-1:0] p;
    p = (DATA_W+COEF_W)'(x) * (DATA_W+COEF_W)'(c);
    return data_t'(p >>> COEF_FRAC);
  endfunction

endpackage
