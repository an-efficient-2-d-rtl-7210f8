// tb_bssp_fifo: self-checking test of the windowed FIFO. A queue in the
// testbench is the reference. Random pushes and multi-entry pops run against
// a buffer of a depth that is not a power of two; the window, the count and
// the full flag are checked every cycle, and pushes into a full buffer must be
// ignored.
module tb_bssp_fifo;
  localparam int DEPTH = 6, PEEK = 4;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic push, full;
  logic [7:0] din;
  logic [$clog2(PEEK+1)-1:0] pop_n;
  logic [7:0] dout [PEEK];
  logic [$clog2(DEPTH+1)-1:0] count;
  logic [7:0] q [$];
  int checks = 0, failures = 0, n_full = 0;

  bssp_fifo #(.T(logic [7:0]), .DEPTH(DEPTH), .PEEK(PEEK)) dut (
    .clk, .rst, .push, .din, .full, .pop_n, .dout, .count);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; din = '0; pop_n = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      // compare state
      checks++;
      if (int'(count) != q.size() || full != (q.size() == DEPTH)) begin
        failures++;
        if (failures < 10) $display("cycle %0d: count %0d full %0d, want %0d", it, count, full, q.size());
      end
      for (int i = 0; i < PEEK; i++)
        if (i < q.size()) begin
          checks++;
          if (dout[i] !== q[i]) begin
            failures++;
            if (failures < 10) $display("cycle %0d: dout[%0d]=%0h want %0h", it, i, dout[i], q[i]);
          end
        end
      if (full) n_full++;
      // drive: bias towards filling in the first half, draining later
      push = ($urandom_range(0, 9) < ((it < 1500) ? 7 : 4));
      din = 8'($urandom);
      pop_n = ($clog2(PEEK+1))'($urandom_range(0, (q.size() < PEEK) ? q.size() : PEEK));
      if ($urandom_range(0, 2) == 0) pop_n = '0;
      @(posedge clk);
      for (int i = 0; i < int'(pop_n); i++) void'(q.pop_front());
      if (push && q.size() + int'(pop_n) < DEPTH) q.push_back(din);
    end
    checks++;
    if (n_full == 0) begin failures++; $display("buffer never became full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
