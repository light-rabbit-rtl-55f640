// Self-checking testbench of dmtd_channel.
//
// Part 1 drives clk_in as data, one value per sample, and checks the
// deglitcher exactly: a high run shorter than 62 samples gives a glitch and
// no tag, a run of 62 gives a tag equal to the counter of its first sample
// plus the 2-cycle sampling latency, a high run without 62 lows before it
// is ignored.
// Part 2 samples a 10 MHz clock (100000 ps) with a 100100 ps offset clock:
// the beat is 1000 samples. Without jitter every tag must be the counter of
// the 0->1 transition seen on the sampled input plus 2, and successive tags
// are exactly 1000 apart. Part 3 adds +-400 ps of edge jitter: the sampled
// bit now toggles around each beat edge, glitches must be reported, and the
// tags must still come once per beat, 1000 +- 8 apart.
`timescale 1ps/1ps
module dmtd_channel_tb;
  localparam int TAG_W = 16;
  localparam int W     = 62;

  logic clk = 1'b0;
  logic rst;
  logic clk_in;
  logic manual, man_val, gen;
  logic [TAG_W-1:0] counter, tag;
  logic tag_valid, glitch;
  int checks = 0, failures = 0;
  int n_tag = 0, n_glitch = 0;
  int jitter_ps = 0;

  always #50050 clk = ~clk;               // 9.99 MHz offset clock
  assign clk_in = manual ? man_val : gen;

  always @(posedge clk) begin
    if (rst) counter <= '0;
    else     counter <= counter + 1'b1;
  end

  dmtd_channel #(.TAG_W(TAG_W), .DEGLITCH_W(W)) dut (
    .clk_dmtd(clk), .rst, .clk_in, .counter, .tag, .tag_valid, .glitch);

  // 10 MHz input with optional random edge jitter around ideal edges.
  initial begin
    longint t_next, d;
    int j;
    gen = 1'b0;
    t_next = 30000;
    forever begin
      j = 0;
      if (jitter_ps > 0) j = int'($urandom_range(0, 2 * jitter_ps)) - jitter_ps;
      d = t_next + longint'(j) - longint'($time);
      #(d);
      gen = ~gen;
      t_next = t_next + 50000;
    end
  end

  always @(negedge clk) begin
    if (tag_valid) n_tag++;
    if (glitch) n_glitch++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic drive(logic v, int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      man_val = v;
    end
  endtask

  // Wait for the next tag (or give up after 'limit' cycles).
  task automatic next_tag(int limit, output logic [TAG_W-1:0] t, output bit got);
    got = 1'b0;
    for (int i = 0; i < limit && !got; i++) begin
      @(negedge clk);
      if (tag_valid) begin
        got = 1'b1;
        t = tag;
      end
    end
  endtask

  // Clean-input reference: counter of the sampled 0->1 transition, plus 2.
  logic prev_s = 1'b1;
  logic [TAG_W-1:0] ref_q[$];
  always @(posedge clk) begin
    if (!rst && !manual && jitter_ps == 0) begin
      if (!prev_s && clk_in) ref_q.push_back(counter + TAG_W'(2));
    end
    prev_s <= clk_in;
  end

  initial begin
    logic [TAG_W-1:0] t, t_prev;
    bit got;
    int start_tags, start_gl, c0;

    manual = 1'b1; man_val = 1'b0;
    rst = 1'b1;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // --- Part 1: deglitcher rules on data-driven input ---
    drive(1'b0, 100);
    start_gl = n_glitch;
    drive(1'b1, 30);                     // too short: glitch
    drive(1'b0, 100);
    check(n_glitch == start_gl + 1 && n_tag == 0, "30-sample high run is a glitch");
    c0 = int'(counter);                  // counter of the next sample edge
    drive(1'b1, 61);                     // 61 highs: not yet a tag
    check(n_tag == 0, "61 high samples are not enough");
    drive(1'b1, 10);
    check(n_tag == 1 && tag == TAG_W'(c0 + 3),
          $sformatf("62 high samples give a tag: %0d, expected %0d", tag, c0 + 3));
    drive(1'b0, 20);                     // short low gap ...
    drive(1'b1, 100);                    // ... does not re-arm
    check(n_tag == 1, "no tag without 62 low samples first");
    drive(1'b0, 62);
    c0 = int'(counter);
    drive(1'b1, 80);
    check(n_tag == 2 && tag == TAG_W'(c0 + 3), "exactly 62 lows re-arm the channel");

    // --- Part 2: clean 10 MHz input, beat of 1000 samples ---
    manual = 1'b0;
    ref_q.delete();
    repeat (1500) @(negedge clk);        // let one beat pass
    ref_q.delete();
    next_tag(2000, t_prev, got);
    for (int i = 0; i < 6; i++) begin
      next_tag(2000, t, got);
      check(got, "clean: a tag every beat");
      check(t - t_prev == TAG_W'(1000), $sformatf("clean: beat period %0d, expected 1000", t - t_prev));
      check(ref_q.size() > 0 && ref_q[ref_q.size() - 1] == t,
            $sformatf("clean: tag %0d at the sampled transition", t));
      t_prev = t;
    end

    // --- Part 3: jittered input ---
    jitter_ps = 400;
    start_gl = n_glitch;
    next_tag(2000, t_prev, got);
    for (int i = 0; i < 10; i++) begin
      next_tag(2000, t, got);
      check(got, "jitter: a tag every beat");
      check(int'(TAG_W'(t - t_prev)) >= 992 && int'(TAG_W'(t - t_prev)) <= 1008,
            $sformatf("jitter: beat period %0d", t - t_prev));
      t_prev = t;
    end
    check(n_glitch > start_gl, $sformatf("jitter: %0d glitches rejected", n_glitch - start_gl));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3s;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
