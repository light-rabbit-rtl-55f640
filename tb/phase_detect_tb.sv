// Self-checking testbench of phase_detect, the node's DMTD phase detector.
//
// The test uses a ratio close to the design's D-DMTD one: two 10 MHz
// inputs (100000 ps) sampled by a 100100 ps helper clock (10 MHz *
// 1000/1001), 1000 samples per beat, 100 ps of input phase per count. Channel 1 is delayed against
// channel 0 by a known amount; since the helper clock is the slower one, a
// later input edge is crossed later, and the difference of the tags of one beat must
// be +delay/100 ps counts, and follow when the delay is changed.
// Each channel's successive tags must be 1000 apart. A third run adds
// +-300 ps of edge jitter: glitches are seen, the difference stays within
// +-6 counts of the expected value.
`timescale 1ps/1ps
module phase_detect_tb;
  localparam int TAG_W = 16;

  logic clk = 1'b0;
  logic rst;
  logic [1:0] clk_in;
  logic [1:0][TAG_W-1:0] tags;
  logic [1:0] tag_valid, glitch;
  longint off1 = 0;
  int jit = 0;
  int checks = 0, failures = 0, n_glitch = 0;

  always #50050 clk = ~clk;

  tb_clock_source src0 (.half_fs(64'd50000000), .offset_ps(64'd0), .jitter_ps(jit), .clk(clk_in[0]));
  tb_clock_source src1 (.half_fs(64'd50000000), .offset_ps(off1),  .jitter_ps(jit), .clk(clk_in[1]));

  phase_detect #(.NCH(2), .TAG_W(TAG_W), .DEGLITCH_W(62)) dut (
    .clk_dmtd(clk), .rst, .clk_in, .tags, .tag_valid, .glitch);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(negedge clk) n_glitch += int'(glitch[0]) + int'(glitch[1]);

  // Latest tag of each channel, with the order of arrival.
  logic [TAG_W-1:0] last0, last1, prev0;
  bit got0, got1;
  always @(negedge clk) begin
    if (tag_valid[0]) begin prev0 = last0; last0 = tags[0]; got0 = 1; end
    if (tag_valid[1]) begin last1 = tags[1]; got1 = 1; end
  end

  // Measure the channel-1 minus channel-0 tag difference over a few beats.
  task automatic measure(int expect_cnt, int tol, string what);
    int d;
    repeat (1200) @(negedge clk);       // settle after a change
    for (int b = 0; b < 4; b++) begin
      got0 = 0; got1 = 0;
      while (!(got0 && got1)) @(negedge clk);
      d = int'($signed(TAG_W'(last1 - last0)));
      while (d > 500) d -= 1000;        // beat is 1000 counts
      while (d < -500) d += 1000;
      check(d >= expect_cnt - tol && d <= expect_cnt + tol,
            $sformatf("%s: difference %0d counts, expected %0d", what, d, expect_cnt));
      check(TAG_W'(last0 - prev0) >= TAG_W'(1000 - tol) && TAG_W'(last0 - prev0) <= TAG_W'(1000 + tol),
            $sformatf("%s: beat period %0d", what, TAG_W'(last0 - prev0)));
    end
  endtask

  initial begin
    int g0;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (1000) @(negedge clk);      // fill prev0
    off1 = 0;      measure(0, 1, "in phase");
    off1 = 12300;  measure(123, 1, "channel 1 delayed 12.3 ns");
    off1 = -25000; measure(-250, 1, "channel 1 early 25 ns");
    jit = 300;
    g0 = n_glitch;
    off1 = 4000;   measure(40, 6, "jitter, 4 ns delay");
    check(n_glitch > g0, "jitter produced rejected glitches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5s;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
