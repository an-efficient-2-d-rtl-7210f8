// bssp_output_ctrl: output control block of the multiprocessor filter.
//
// Collects the filtered rows from the processors in the same round-robin
// order in which the input control block handed them out (row r comes from
// PE r mod NPE) and sends them out as one raster-scan stream. The collection
// order follows the architecture; the handshake is this design's choice.
//
// Interface: g_valid[p]/g_data[p]/g_pop[p] read the output buffer of PE p.
// out_valid/out_ready/out_g is the output stream; out_row_end marks the last
// pixel of a row. Timing: combinational from the PE buffer to the output,
// counters update on the clock edge. Synchronous active-high reset.
module bssp_output_ctrl
  import bssp_pkg::*;
#(
  parameter int unsigned NPE = 4,
  parameter int unsigned W   = 512
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  g_valid [NPE],
  input  data_t g_data  [NPE],
  output logic  g_pop   [NPE],
  output logic  out_valid,
  input  logic  out_ready,
  output data_t out_g,
  output logic  out_row_end
);

  logic [$clog2(W)-1:0]   col;
  logic [$clog2(NPE)-1:0] pe_sel;
  logic                   take;

  always_comb begin
    out_valid   = g_valid[pe_sel];
    out_g       = g_data[pe_sel];
    out_row_end = (int'(col) == W - 1);
    take        = out_valid && out_ready;
    for (int p = 0; p < NPE; p++) g_pop[p] = take && (int'(pe_sel) == p);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      col    <= '0;
      pe_sel <= '0;
    end else if (take) begin
      if (int'(col) == W - 1) begin
        col    <= '0;
        pe_sel <= (int'(pe_sel) == NPE - 1) ? '0 : pe_sel + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

endmodule
