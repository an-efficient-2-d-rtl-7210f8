// bssp_top: multiprocessor 2-D IIR/FIR filter built on the block state space
// representation.
//
// An input control block deals the rows of each frame out to NPE identical
// processing elements in turn. The PEs form a linear array closed into a ring:
// PE p passes the vertical state variables of its row to PE p+1 (the last PE
// to PE 0), which needs them for the row below. Horizontal states never leave
// a PE. Every link is a FIFO, so each PE runs at full speed whenever its
// pixels and the vertical states from above are present. An output control
// block collects the filtered rows in order. With T_p = (M+L)(N+1)/L clock
// cycles per pixel in a PE, NPE PEs sustain one pixel every T_p/NPE cycles.
//
// The coefficient write port and the IIR/FIR mode are shared by all PEs; the
// mode may only change between frames. Port names follow bssp_pe,
// bssp_input_ctrl and bssp_output_ctrl. The activity outputs (op_issue,
// stall_q, stall_out, one bit per PE) are for observation only.
// Synchronous active-high reset. The organisation follows the architecture;
// the handshakes and the frame tags are this design's choices.
module bssp_top
  import bssp_pkg::*;
#(
  parameter int unsigned M   = 2,    // horizontal filter order
  parameter int unsigned N   = 2,    // vertical filter order
  parameter int unsigned W   = 512,  // pixels per row
  parameter int unsigned H   = 512,  // rows per frame
  parameter int unsigned NPE = 4     // processing elements
) (
  input  logic       clk,
  input  logic       rst,
  input  filt_mode_e mode,
  input  logic       coef_we,
  input  logic       coef_sel,
  input  logic [$clog2(M+1)-1:0] coef_i,
  input  logic [$clog2(N+1)-1:0] coef_j,
  input  coef_t      coef_wdata,
  input  logic       in_valid,
  output logic       in_ready,
  input  data_t      in_f,
  output logic       out_valid,
  input  logic       out_ready,
  output data_t      out_g,
  output logic       out_row_end,
  output logic [NPE-1:0] op_issue,
  output logic [NPE-1:0] stall_q,
  output logic [NPE-1:0] stall_out
);

  logic  pix_push [NPE];
  logic  pix_full [NPE];
  pix_t  pix_bus;
  logic  q_push   [NPE];   // q_push[p]: from PE p to PE (p+1) mod NPE
  data_t q_data   [NPE];
  logic  q_full   [NPE];   // q_full[p]: vertical state buffer of PE p is full
  logic  g_valid  [NPE];
  data_t g_data   [NPE];
  logic  g_pop    [NPE];

  bssp_input_ctrl #(.NPE(NPE), .W(W), .H(H)) u_in (
    .clk, .rst, .in_valid, .in_ready, .in_f,
    .pix_push, .pix_out(pix_bus), .pix_full);

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    localparam int unsigned PREV = (p == 0) ? NPE - 1 : p - 1;
    localparam int unsigned NEXT = (p == NPE - 1) ? 0 : p + 1;
    bssp_pe #(.M(M), .N(N), .W(W)) u_pe (
      .clk, .rst, .mode,
      .coef_we, .coef_sel, .coef_i, .coef_j, .coef_wdata,
      .pix_push(pix_push[p]), .pix_in(pix_bus), .pix_full(pix_full[p]),
      .q_in_push(q_push[PREV]), .q_in_data(q_data[PREV]), .q_in_full(q_full[p]),
      .q_out_push(q_push[p]), .q_out_data(q_data[p]), .q_out_full(q_full[NEXT]),
      .g_valid(g_valid[p]), .g_data(g_data[p]), .g_pop(g_pop[p]),
      .op_issue(op_issue[p]), .stall_q(stall_q[p]), .stall_out(stall_out[p]));
  end

  bssp_output_ctrl #(.NPE(NPE), .W(W)) u_out (
    .clk, .rst, .g_valid, .g_data, .g_pop,
    .out_valid, .out_ready, .out_g, .out_row_end);

endmodule
