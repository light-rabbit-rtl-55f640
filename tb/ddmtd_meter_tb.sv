// Self-checking testbench of ddmtd_meter, the D-DMTD 10 MHz meter.
//
// Offset clock 100100.1 ps, i.e. 10 MHz * 999/1000 (N = 999), so a 10 MHz
// input (100000 ps) beats every T/(Ts - T) = N = 999 samples and one count
// is 100.1 ps. Checks:
//  * equal 10 MHz inputs: period_a = period_b = 999 and phase_diff = 0;
//  * in_b delayed by 5 ns: phase_diff = 5000/100.1 = 50 counts; in_b early
//    by 5 ns: 999 - 50 = 949 (reduced modulo N);
//  * in_b 10 ppm slow (period 100001 ps): the beat stretches to
//    100001 / 99.1 = 1009.1 samples, so period_b = 1009 or 1010, and
//    phase_diff walks by about 10 counts every beat;
//  * one result per beat with a rising timestamp;
//  * with +-300 ps edge jitter glitches are counted and periods stay
//    within +-8 counts.
`timescale 1ps/1ps
module ddmtd_meter_tb;
  localparam int TAG_W = 16;

  logic clk;
  logic rst;
  logic in_a, in_b;
  logic meas_valid;
  logic [TAG_W-1:0] phase_diff, period_a, period_b;
  logic [31:0] timestamp;
  logic [15:0] glitch_count;
  longint half_b = 50000000, off_b = 0;
  int jit = 0;
  int checks = 0, failures = 0;

  tb_clock_source src_s (.half_fs(64'd50050050), .offset_ps(64'd3000), .jitter_ps(0), .clk(clk));

  tb_clock_source src_a (.half_fs(64'd50000000), .offset_ps(64'd0), .jitter_ps(jit), .clk(in_a));
  tb_clock_source src_b (.half_fs(half_b), .offset_ps(off_b), .jitter_ps(jit), .clk(in_b));

  ddmtd_meter dut (
    .clk_dmtd(clk), .rst, .in_a, .in_b, .meas_valid, .phase_diff,
    .period_a, .period_b, .timestamp, .glitch_count);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic next_result(output bit got);
    got = 0;
    for (int i = 0; i < 3000 && !got; i++) begin
      @(negedge clk);
      if (meas_valid) got = 1;
    end
  endtask

  task automatic run_case(int exp_diff, int exp_pb_lo, int exp_pb_hi, int tol, string what);
    bit got;
    logic [31:0] ts_prev;
    repeat (2500) @(negedge clk);       // two beats to settle
    next_result(got);
    ts_prev = timestamp;
    for (int b = 0; b < 4; b++) begin
      next_result(got);
      check(got, {what, ": one result per beat"});
      check(timestamp - ts_prev >= 32'(exp_pb_lo - tol) && timestamp - ts_prev <= 32'(exp_pb_hi + tol),
            $sformatf("%s: results %0d cycles apart", what, timestamp - ts_prev));
      ts_prev = timestamp;
      check(int'(period_a) >= 999 - tol && int'(period_a) <= 999 + tol,
            $sformatf("%s: period_a %0d", what, period_a));
      check(int'(period_b) >= exp_pb_lo - tol && int'(period_b) <= exp_pb_hi + tol,
            $sformatf("%s: period_b %0d, expected %0d..%0d", what, period_b, exp_pb_lo, exp_pb_hi));
      if (exp_diff >= 0)
        check(int'(phase_diff) >= exp_diff - tol && int'(phase_diff) <= exp_diff + tol,
              $sformatf("%s: phase_diff %0d, expected %0d", what, phase_diff, exp_diff));
      check(int'(phase_diff) < 999, $sformatf("%s: phase_diff %0d below N", what, phase_diff));
    end
  endtask

  initial begin
    int p0, p1;
    bit got;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run_case(0, 999, 999, 1, "equal inputs");
    off_b = 5000;  run_case(50, 999, 999, 1, "in_b 5 ns late");
    off_b = -5000; run_case(949, 999, 999, 1, "in_b 5 ns early");
    // 10 ppm slow in_b: 100001 ps period
    off_b = 0;
    half_b = 50000500;
    run_case(-1, 1009, 1010, 1, "in_b 10 ppm slow");
    next_result(got); p0 = int'(phase_diff);
    next_result(got); p1 = int'(phase_diff);
    check(((p1 - p0 + 999) % 999) >= 9 && ((p1 - p0 + 999) % 999) <= 12,
          $sformatf("10 ppm: phase walks %0d counts per beat", (p1 - p0 + 999) % 999));
    half_b = 50000000;
    jit = 300;
    run_case(-1, 999, 999, 8, "jitter");
    check(glitch_count > 0, $sformatf("jitter: %0d glitches counted", glitch_count));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10s;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
