// tb_bssp_realtime: real-time operation of the four-processor array on
// 512 x 512 video at 30 frames/s (a pixel every 127 ns) with a 100 ns clock,
// i.e. one CP-4 evaluation per 100 ns. The array keeps up when
// T_p / 4 <= 1.27 cycles per pixel:
//   2nd-order FIR, block size 4: T_p = 4.5 -> 1.125, real time, no overrun;
//   1st-order IIR, block size 2: T_p = 3   -> 0.75,  real time, no overrun;
//   2nd-order IIR, block size 2: T_p = 6   -> 1.5,   too slow, overruns.
// Outputs are checked in all three cases; the overrun counts are checked
// against these expectations.
module tb_bssp_realtime;
  logic clk = 0;
  always #5 clk = ~clk;

  logic start = 0;
  logic done [3];
  int c [3], fl [3], ov [3], cy [3];

  top_realtime_run #(.M(2), .N(2), .FIR(1'b1)) u_fir2 (
    .clk, .start, .done(done[0]), .checks(c[0]), .failures(fl[0]), .overruns(ov[0]), .cycles(cy[0]));
  top_realtime_run #(.M(1), .N(1), .FIR(1'b0)) u_iir1 (
    .clk, .start, .done(done[1]), .checks(c[1]), .failures(fl[1]), .overruns(ov[1]), .cycles(cy[1]));
  top_realtime_run #(.M(2), .N(2), .FIR(1'b0)) u_iir2 (
    .clk, .start, .done(done[2]), .checks(c[2]), .failures(fl[2]), .overruns(ov[2]), .cycles(cy[2]));

  initial begin
    repeat (1000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end

  initial begin
    int checks = 0, failures = 0;
    #20 start = 1;
    wait (done[0] && done[1] && done[2]);
    $display("2nd-order FIR: %0d cycles, %0d overruns", cy[0], ov[0]);
    $display("1st-order IIR: %0d cycles, %0d overruns", cy[1], ov[1]);
    $display("2nd-order IIR: %0d cycles, %0d overruns", cy[2], ov[2]);
    for (int i = 0; i < 3; i++) begin
      checks += c[i];
      failures += fl[i];
    end
    checks += 3;
    if (ov[0] != 0) failures++;
    if (ov[1] != 0) failures++;
    if (ov[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
