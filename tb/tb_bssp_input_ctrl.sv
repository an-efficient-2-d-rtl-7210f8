// tb_bssp_input_ctrl: self-checking test of the input control block. A
// stream of several frames (H rows of W pixels) is sent with random gaps
// while the row buffers of the PEs report full at random. Each accepted
// pixel must be pushed to exactly the PE that owns its row (row r goes to
// PE r mod NPE, counting rows across frames), carry the right first/last-row
// flags and the right sample, and in_ready must follow the owner's full flag.
module tb_bssp_input_ctrl;
  import bssp_pkg::*;
  localparam int NPE = 3, W = 4, H = 5;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic in_valid, in_ready;
  data_t in_f;
  logic pix_push [NPE];
  pix_t pix_out;
  logic pix_full [NPE];
  int checks = 0, failures = 0, n_block = 0;

  bssp_input_ctrl #(.NPE(NPE), .W(W), .H(H)) dut (
    .clk, .rst, .in_valid, .in_ready, .in_f, .pix_push, .pix_out, .pix_full);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int px = 0;
    bit accept;
    in_valid = 0; in_f = '0;
    for (int p = 0; p < NPE; p++) pix_full[p] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    while (px < 4 * H * W) begin
      int grow, owner;
      @(negedge clk);
      grow = px / W;
      owner = grow % NPE;
      in_valid = ($urandom_range(0, 3) != 0);
      in_f = data_t'(px * 7 + 3);
      for (int p = 0; p < NPE; p++) pix_full[p] = ($urandom_range(0, 3) == 0);
      #1;
      checks++;
      if (in_ready !== !pix_full[owner]) begin
        failures++; $display("pixel %0d: in_ready %0d with owner full %0d", px, in_ready, pix_full[owner]);
      end
      if (in_valid && !in_ready) n_block++;
      for (int p = 0; p < NPE; p++) begin
        checks++;
        if (pix_push[p] !== (in_valid && in_ready && p == owner)) begin
          failures++; $display("pixel %0d: push[%0d]=%0d", px, p, pix_push[p]);
        end
      end
      if (in_valid && in_ready) begin
        checks++;
        if (pix_out.f !== in_f || pix_out.first_row !== (grow % H == 0) ||
            pix_out.last_row !== (grow % H == H - 1)) begin
          failures++; $display("pixel %0d: wrong data or flags", px);
        end
      end
      accept = in_valid && in_ready;
      @(posedge clk);
      if (accept) px++;
    end
    checks++;
    if (n_block == 0) begin failures++; $display("input never blocked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
