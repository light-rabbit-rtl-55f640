// End-to-end testbench of light_rabbit_top, MMCM variant, default parameters.
//
// Both node clocks are made by free-running oscillators passed through a
// phase-shifting MMCM (behavioural model: each PSEN moves the clock by
// 18 ps, 1/56 of a 1 GHz VCO period, PSDONE 12 PSCLK cycles later): the
// helper clock, 10 ppm fast, and the main clock, 20 ppm fast. The
// testbench plays the SoftPLL with two PI controllers. The helper loop
// holds the RX tags on a reference that advances 1000 counts per beat, so
// the helper settles at exactly f * 1000/1001 of the RX clock; the main
// loop steers tag_main onto tag_rx. Both write their DAC words. Clocks
// are scaled to 10 MHz so that the helper clock (100100 ps) gives a
// 1000-sample beat and the meter's offset clock (100100.1 ps) the design's
// N = 999; PSCLK is 62.5 MHz.
//
// What must happen:
//  * the main loop locks: phase error within +-4 counts (400 ps) for the
//    last 20 beats of each run, both for a 20 ppm fast and, after a
//    frequency step, a 20 ppm slow oscillator;
//  * the helper loop locks: RX tag within +-4 counts of its reference for
//    the last 20 beats of each run, and the beat then lasts 1000 samples;
//  * the D-DMTD meter, fed with the main clock and the RX clock, sees the
//    frequency error before lock (beat of about 980 samples) and a beat of
//    999 +- 3 samples (N) after lock;
//  * mechanisms counted, each must occur: main phase steps up and down,
//    helper phase steps, a stall of the phase-shift DAC (helper DAC at full
//    scale), deglitched glitches in the phase detector and in the meter,
//    meter results; and no PSEN may reach an MMCM that is still busy.
`timescale 1ps/1ps
module light_rabbit_top_tb;
  import lr_pkg::*;

  localparam longint STEP_PS = 18;

  // clocks and resets
  logic clk_sys = 1'b0, clk_dmtd, clk_ddmtd;
  logic rst_sys, rst_dmtd, rst_ddmtd;
  logic clk_rx, clk_main;
  always #8000 clk_sys = ~clk_sys;        // 62.5 MHz PSCLK
  tb_clock_source src_ddmtd (.half_fs(64'd50050050), .offset_ps(64'd12345), .jitter_ps(0),
                             .clk(clk_ddmtd));   // 9.99 MHz, N = 999

  // DUT connections
  logic helper_dac_load, main_dac_load;
  dac_t helper_dac, main_dac;
  mmcm_ps_t helper_ps, main_ps;
  logic helper_psdone, main_psdone;
  logic [1:0] ps_stall, sdm_update, sdm_sat, tag_valid, tag_glitch;
  sdm_t sdm_helper, sdm_main, sdm_eth;
  logic [15:0] tag_rx, tag_main;
  logic meas_valid;
  logic [15:0] meas_phase, meas_period_node, meas_period_switch, meas_glitches;
  logic [31:0] meas_timestamp;

  light_rabbit_top dut (
    .clk_sys, .rst_sys, .helper_dac_load, .helper_dac, .main_dac_load, .main_dac,
    .helper_ps, .helper_psdone, .main_ps, .main_psdone, .ps_stall,
    .sdm_helper, .sdm_main, .sdm_eth, .sdm_update, .sdm_sat,
    .clk_dmtd, .rst_dmtd, .clk_rx, .clk_main, .tag_rx, .tag_main, .tag_valid, .tag_glitch,
    .clk_ddmtd, .rst_ddmtd, .ten_mhz_node(clk_main), .ten_mhz_switch(clk_rx),
    .meas_valid, .meas_phase, .meas_period_node, .meas_period_switch,
    .meas_timestamp, .meas_glitches);

  // Behavioural MMCMs on the two phase-shift ports.
  int helper_steps, main_steps, helper_viol, main_viol;
  mmcm_ps_model mmcm_helper (.psclk(clk_sys), .rst(rst_sys), .psen(helper_ps.psen),
    .psincdec(helper_ps.psincdec), .psdone(helper_psdone), .steps(helper_steps),
    .violations(helper_viol));
  mmcm_ps_model mmcm_main (.psclk(clk_sys), .rst(rst_sys), .psen(main_ps.psen),
    .psincdec(main_ps.psincdec), .psdone(main_psdone), .steps(main_steps),
    .violations(main_viol));

  // RX clock: nominal 10 MHz. Main and helper clock: free-running
  // oscillators shifted by their MMCM's steps. The nominal helper period,
  // 100100 ps, gives a 1000-sample beat.
  longint main_half = 49999000;             // 20 ppm fast
  longint helper_half = 50049500;           // 10 ppm fast
  longint main_off, helper_off;
  int jit = 150;
  always_comb main_off = 37000 + longint'(main_steps) * STEP_PS;
  always_comb helper_off = 21000 + longint'(helper_steps) * STEP_PS;
  tb_clock_source src_dmtd (.half_fs(helper_half), .offset_ps(helper_off), .jitter_ps(0), .clk(clk_dmtd));
  tb_clock_source src_rx   (.half_fs(64'd50000000), .offset_ps(64'd0), .jitter_ps(jit), .clk(clk_rx));
  tb_clock_source src_main (.half_fs(main_half), .offset_ps(main_off), .jitter_ps(jit), .clk(clk_main));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- SoftPLL
  // Main loop: PI controller on each new main tag, using the latest RX tag.
  // Helper loop: PI controller on each new RX tag against a reference that
  // advances by one nominal beat (1000 counts) per tag. A later helper
  // clock gives smaller tags, so the helper DAC moves the other way round.
  localparam int KP = 100, KI = 10;
  logic [15:0] href;
  bit have_href;
  int herr, hinteg, hbeats;
  int herr_hist[$];
  bit hdac_req;
  dac_t hdac_next;
  bit helper_on = 1'b0;
  int rx_period;
  logic [15:0] last_rx;
  bit have_rx;
  int err, integ, beats;
  int err_hist[$];
  bit dac_req;
  dac_t dac_next;
  bit loop_on = 1'b0;

  always @(negedge clk_dmtd) begin
    if (!rst_dmtd) begin
      if (tag_valid[0]) begin
        if (have_rx) rx_period = int'(16'(tag_rx - last_rx));
        last_rx = tag_rx;
        have_rx = 1'b1;
        if (helper_on) begin
          int u, d;
          if (!have_href) begin
            href = tag_rx;
            have_href = 1'b1;
          end else begin
            href = href + 16'd1000;
          end
          herr = int'($signed(16'(tag_rx - href)));
          while (herr >= 500) herr -= 1000;
          while (herr < -500) herr += 1000;
          hinteg += herr;
          if (hinteg > 3000) hinteg = 3000;
          if (hinteg < -3000) hinteg = -3000;
          u = KP * herr + KI * hinteg;
          d = 32768 + u;
          if (d < 0) d = 0;
          if (d > 65535) d = 65535;
          hdac_next = dac_t'(d);
          hdac_req = 1'b1;
          hbeats++;
          herr_hist.push_back(herr);
        end
      end
      if (tag_valid[1] && have_rx && loop_on) begin
        int u, d;
        err = int'($signed(16'(tag_main - last_rx)));
        while (err >= 500) err -= 1000;
        while (err < -500) err += 1000;
        integ += err;
        if (integ > 3000) integ = 3000;
        if (integ < -3000) integ = -3000;
        u = KP * err + KI * integ;
        d = 32768 - u;
        if (d < 0) d = 0;
        if (d > 65535) d = 65535;
        dac_next = dac_t'(d);
        dac_req = 1'b1;
        beats++;
        err_hist.push_back(err);
      end
    end
  end

  // DAC writes in the PSCLK domain.
  always @(negedge clk_sys) begin
    main_dac_load = 1'b0;
    helper_dac_load = 1'b0;
    if (dac_req) begin
      main_dac = dac_next;
      main_dac_load = 1'b1;
      dac_req = 1'b0;
    end
    if (hdac_req) begin
      helper_dac = hdac_next;
      helper_dac_load = 1'b1;
      hdac_req = 1'b0;
    end
  end

  // ------------------------------------------------------- mechanism counts
  int n_inc, n_dec, n_helper_ps, n_stall, n_glitch, n_meas;
  always @(negedge clk_sys) begin
    if (!rst_sys) begin
      if (main_ps.psen) begin
        if (main_ps.psincdec) n_inc++; else n_dec++;
      end
      if (helper_ps.psen) n_helper_ps++;
      if (ps_stall != 2'b00) n_stall++;
    end
  end
  always @(negedge clk_dmtd) if (!rst_dmtd) n_glitch += int'(tag_glitch[0]) + int'(tag_glitch[1]);
  logic [15:0] last_period_node;
  always @(negedge clk_ddmtd) if (meas_valid) begin
    n_meas++;
    last_period_node = meas_period_node;
  end

  task automatic helper_write(dac_t v);
    @(posedge clk_sys);
    hdac_next = v;
    hdac_req = 1'b1;
    @(posedge clk_sys);
  endtask

  function automatic int worst_of_last20(ref int hist[$]);
    int worst = 0;
    for (int i = hist.size() - 20; i < hist.size(); i++)
      if ((hist[i] < 0 ? -hist[i] : hist[i]) > worst)
        worst = hist[i] < 0 ? -hist[i] : hist[i];
    return worst;
  endfunction

  // Run the loops for 'n' main beats and check the last 20 errors of each.
  task automatic run_beats(int n, string what);
    int b0, worst;
    b0 = beats;
    while (beats < b0 + n) @(negedge clk_dmtd);
    worst = worst_of_last20(err_hist);
    check(worst <= 4, $sformatf("%s: main loop locked, worst error of last 20 beats %0d counts", what, worst));
    worst = worst_of_last20(herr_hist);
    check(hbeats > 20 && worst <= 4,
          $sformatf("%s: helper loop locked, worst error of last 20 beats %0d counts", what, worst));
  endtask

  initial begin
    int first_period;
    rst_sys = 1'b1; rst_dmtd = 1'b1; rst_ddmtd = 1'b1;
    helper_dac_load = 1'b0; helper_dac = 16'h8000;
    main_dac_load = 1'b0; main_dac = 16'h8000;
    integ = 0; beats = 0; have_rx = 0; dac_req = 0;
    hinteg = 0; hbeats = 0; have_href = 0; hdac_req = 0;
    n_inc = 0; n_dec = 0; n_helper_ps = 0; n_stall = 0; n_glitch = 0; n_meas = 0;
    repeat (4) @(negedge clk_dmtd);
    rst_sys = 1'b0; rst_dmtd = 1'b0; rst_ddmtd = 1'b0;

    // Free-running: the meter sees the 20 ppm error (beat ~ 99998/102.1).
    repeat (3500) @(negedge clk_ddmtd);
    first_period = int'(last_period_node);
    check(first_period >= 975 && first_period <= 986,
          $sformatf("free-running main clock: beat %0d samples, expected about 980", first_period));
    // 10 ppm fast helper: the RX beat lasts 100000/99 = 1010 samples.
    check(rx_period >= 1007 && rx_period <= 1013,
          $sformatf("free-running helper: RX beat %0d samples, expected about 1010", rx_period));

    // Helper DAC at full scale for a while: the helper phase-shift DAC must
    // stall (the MMCM needs 13 cycles per step, the DAC asks one per 12).
    helper_write(16'hFFFF);
    repeat (2000) @(negedge clk_sys);
    helper_write(16'h8800);

    // Close both loops: helper 10 ppm fast, main 20 ppm fast.
    helper_on = 1'b1;
    loop_on = 1'b1;
    run_beats(120, "20 ppm fast");
    repeat (3000) @(negedge clk_ddmtd);
    check(int'(last_period_node) >= 996 && int'(last_period_node) <= 1002,
          $sformatf("locked: meter beat %0d samples, expected 999", last_period_node));
    check(n_inc > 0, $sformatf("phase steps up: %0d", n_inc));
    check(rx_period >= 998 && rx_period <= 1002,
          $sformatf("helper locked: RX beat %0d samples, expected 1000", rx_period));

    // Frequency step of the oscillator: 20 ppm slow, the loop re-locks
    // by stepping the phase the other way.
    main_half = 50001000;
    run_beats(150, "20 ppm slow");
    repeat (3000) @(negedge clk_ddmtd);
    check(int'(last_period_node) >= 996 && int'(last_period_node) <= 1002,
          $sformatf("re-locked: meter beat %0d samples", last_period_node));

    // Mechanisms
    check(n_dec > 0, $sformatf("phase steps down: %0d", n_dec));
    check(n_helper_ps > 0 && helper_steps > 0, $sformatf("helper phase steps: %0d", n_helper_ps));
    check(n_stall > 0, $sformatf("phase-shift stall cycles: %0d", n_stall));
    check(n_glitch > 0, $sformatf("phase detector glitches rejected: %0d", n_glitch));
    check(meas_glitches > 0, $sformatf("meter glitches rejected: %0d", meas_glitches));
    check(n_meas > 100, $sformatf("meter results: %0d", n_meas));
    check(main_viol == 0 && helper_viol == 0, "no PSEN to a busy MMCM");
    check(sdm_main == '0 && sdm_update == '0, "QPLL outputs idle in the MMCM variant");
    $display("mechanisms: inc=%0d dec=%0d helper=%0d stall=%0d glitch=%0d meas=%0d beats=%0d",
             n_inc, n_dec, n_helper_ps, n_stall, n_glitch, n_meas, beats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
