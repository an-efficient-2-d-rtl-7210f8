// bssp_input_ctrl: input control block of the multiprocessor filter.
//
// Receives the raster-scan pixel stream and hands out whole rows to the
// processors in turn: row 0 to PE 0, row 1 to PE 1, ..., row NPE to PE 0
// again, so that each PE filters one row while the next PE already works on
// the row below with the vertical states it has received. Every pixel is
// tagged with first_row/last_row of the frame (H rows of W pixels) so the PE
// knows when there are no vertical states from above and when none need to be
// passed on. The row-to-processor assignment follows the architecture; the
// tags and the valid/ready handshake are this design's choices.
//
// Interface: in_valid/in_ready/in_f is the input stream (a pixel moves when
// both valid and ready are high). pix_push[p] writes pix_out into the row
// buffer of PE p; in_ready is low while the row buffer of the PE that owns
// the current row is full. Timing: combinational from in_valid to pix_push,
// counters update on the clock edge. Synchronous active-high reset.
module bssp_input_ctrl
  import bssp_pkg::*;
#(
  parameter int unsigned NPE = 4,
  parameter int unsigned W   = 512,
  parameter int unsigned H   = 512
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  output logic  in_ready,
  input  data_t in_f,
  output logic  pix_push [NPE],
  output pix_t  pix_out,
  input  logic  pix_full [NPE]
);

  logic [$clog2(W)-1:0]   col;
  logic [$clog2(H)-1:0]   row;
  logic [$clog2(NPE)-1:0] pe_sel;
  logic                   take;

  always_comb begin
    in_ready = !pix_full[pe_sel];
    take     = in_valid && in_ready;
    for (int p = 0; p < NPE; p++) pix_push[p] = take && (int'(pe_sel) == p);
    pix_out  = '{first_row: (row == '0), last_row: (int'(row) == H - 1), f: in_f};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      col    <= '0;
      row    <= '0;
      pe_sel <= '0;
    end else if (take) begin
      if (int'(col) == W - 1) begin
        col    <= '0;
        row    <= (int'(row) == H - 1) ? '0 : row + 1'b1;
        pe_sel <= (int'(pe_sel) == NPE - 1) ? '0 : pe_sel + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

endmodule
