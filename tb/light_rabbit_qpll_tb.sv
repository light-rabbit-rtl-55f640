// End-to-end testbench of light_rabbit_top, QPLL variant.
//
// The node's main and helper clocks come from QPLLs: a fixed oscillator
// (15 ppm fast for the main clock, 10 ppm fast for the helper clock),
// multiplied by (80 + SDM/2^18) and divided back so that mid-scale DAC
// (SDM = 4096) gives the nominal clock. Changing SDM changes the frequency
// without a phase jump. The testbench plays the SoftPLL with the same two
// PI loops as the MMCM test (helper: RX tags onto a reference advancing
// 1000 counts per beat; main: tag_main onto tag_rx), but the DAC now sets
// a frequency, so the controller signs are the opposite ones. Clocks are scaled to 10 MHz (helper 100100 ps, meter
// offset clock 100100.1 ps, N = 999)
// and the DAC write clock is 62.5 MHz.
//
// What must happen:
//  * both loops lock (phase error within +-4 counts for the last 20 beats),
//    before and after a step of the main oscillator to 15 ppm slow; the RX
//    beat is then 1000 helper samples;
//  * the D-DMTD meter sees a beat of about 985 samples before lock and
//    999 +- 3 (N) after;
//  * the main and ETH SDM values are equal at every clock and change in the
//    same cycle; each equals 4096 + (DAC - 0x8000)/16 of the last write;
//  * counted, each must occur: SDM updates of main/ETH and of the helper,
//    deglitched glitches; the phase-shift outputs stay idle.
`timescale 1ps/1ps
module light_rabbit_qpll_tb;
  import lr_pkg::*;


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

  light_rabbit_top #(.ACTUATOR(ACT_QPLL)) dut (
    .clk_sys, .rst_sys, .helper_dac_load, .helper_dac, .main_dac_load, .main_dac,
    .helper_ps, .helper_psdone, .main_ps, .main_psdone, .ps_stall,
    .sdm_helper, .sdm_main, .sdm_eth, .sdm_update, .sdm_sat,
    .clk_dmtd, .rst_dmtd, .clk_rx, .clk_main, .tag_rx, .tag_main, .tag_valid, .tag_glitch,
    .clk_ddmtd, .rst_ddmtd, .ten_mhz_node(clk_main), .ten_mhz_switch(clk_rx),
    .meas_valid, .meas_phase, .meas_period_node, .meas_period_switch,
    .meas_timestamp, .meas_glitches);

  // QPLL main clock: oscillator error 'osc_ppm', ratio (80 + SDM/2^18).
  real osc_ppm = 15.0;
  longint main_half;
  int jit = 150;
  always_comb main_half = longint'(50000000.0 * (80.0 + 4096.0 / 262144.0)
                                  / (80.0 + real'(sdm_main) / 262144.0)
                                  / (1.0 + osc_ppm * 1.0e-6));
  assign helper_psdone = 1'b0;
  assign main_psdone   = 1'b0;
  tb_clock_source src_rx   (.half_fs(64'd50000000), .offset_ps(64'd0), .jitter_ps(jit), .clk(clk_rx));
  tb_clock_source src_main (.half_fs(main_half), .offset_ps(64'd41000), .jitter_ps(jit), .clk(clk_main));

  // QPLL helper clock, nominal 100100 ps (1000-sample beat), oscillator
  // 10 ppm fast.
  longint helper_half;
  always_comb helper_half = longint'(50050000.0 * (80.0 + 4096.0 / 262144.0)
                                    / (80.0 + real'(sdm_helper) / 262144.0)
                                    / (1.0 + 10.0e-6));
  tb_clock_source src_dmtd (.half_fs(helper_half), .offset_ps(64'd21000), .jitter_ps(0), .clk(clk_dmtd));

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
  // advances by one nominal beat (1000 counts) per tag. A faster helper
  // clock gives larger tags, so the helper DAC moves the other way round.
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
          d = 32768 - u;
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
        d = 32768 + u;        // higher DAC = higher frequency
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
  int n_main_upd, n_helper_upd, n_ps, n_glitch, n_meas, n_map_err;
  dac_t last_main_dac;
  always @(negedge clk_sys) begin
    if (!rst_sys) begin
      if (main_dac_load) last_main_dac = main_dac;
      if (sdm_eth != sdm_main) n_map_err++;
      if (sdm_update[1]) begin
        n_main_upd++;
        if (int'(sdm_main) != 4096 + ((int'(last_main_dac) - 32768) >>> 4)) n_map_err++;
      end
      if (sdm_update[0]) n_helper_upd++;
      if (helper_ps.psen || main_ps.psen || ps_stall != 2'b00) n_ps++;
    end
  end
  always @(negedge clk_dmtd) if (!rst_dmtd) n_glitch += int'(tag_glitch[0]) + int'(tag_glitch[1]);
  logic [15:0] last_period_node;
  always @(negedge clk_ddmtd) if (meas_valid) begin
    n_meas++;
    last_period_node = meas_period_node;
  end

  // Write the helper DAC and wait until the SDM value has been updated.
  task automatic helper_write(dac_t v);
    @(posedge clk_sys);
    hdac_next = v;
    hdac_req = 1'b1;
    repeat (3) @(posedge clk_sys);
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
    n_main_upd = 0; n_helper_upd = 0; n_ps = 0; n_glitch = 0; n_meas = 0; n_map_err = 0;
    last_main_dac = 16'h8000;
    repeat (4) @(negedge clk_dmtd);
    rst_sys = 1'b0; rst_dmtd = 1'b0; rst_ddmtd = 1'b0;

    // Free-running: the meter sees the 15 ppm error (beat ~ 99998.5/101.6).
    repeat (3500) @(negedge clk_ddmtd);
    first_period = int'(last_period_node);
    check(first_period >= 980 && first_period <= 990,
          $sformatf("free-running main clock: beat %0d samples, expected about 985", first_period));
    // 10 ppm fast helper: the RX beat lasts 100000/99 = 1010 samples.
    check(rx_period >= 1007 && rx_period <= 1013,
          $sformatf("free-running helper: RX beat %0d samples, expected about 1010", rx_period));

    // One open-loop write of the helper QPLL: 0x9000 maps to 4096 + 256.
    helper_write(16'h9000);
    check(sdm_helper == 18'(4096 + 256), $sformatf("helper SDM %0d", sdm_helper));

    // Close both loops: helper 10 ppm fast, main 15 ppm fast.
    helper_on = 1'b1;
    loop_on = 1'b1;
    run_beats(120, "15 ppm fast");
    repeat (3000) @(negedge clk_ddmtd);
    check(int'(last_period_node) >= 996 && int'(last_period_node) <= 1002,
          $sformatf("locked: meter beat %0d samples, expected 999", last_period_node));
    check(rx_period >= 998 && rx_period <= 1002,
          $sformatf("helper locked: RX beat %0d samples, expected 1000", rx_period));

    // Frequency step of the oscillator to 15 ppm slow: the loop re-locks.
    osc_ppm = -15.0;
    run_beats(150, "15 ppm slow");
    repeat (3000) @(negedge clk_ddmtd);
    check(int'(last_period_node) >= 996 && int'(last_period_node) <= 1002,
          $sformatf("re-locked: meter beat %0d samples", last_period_node));

    // Mechanisms
    check(n_main_upd > 100, $sformatf("main/ETH SDM updates: %0d", n_main_upd));
    check(n_helper_upd > 0, $sformatf("helper SDM updates: %0d", n_helper_upd));
    check(n_map_err == 0, $sformatf("SDM main = ETH = mapped DAC: %0d mismatches", n_map_err));
    check(n_glitch > 0, $sformatf("phase detector glitches rejected: %0d", n_glitch));
    check(meas_glitches > 0, $sformatf("meter glitches rejected: %0d", meas_glitches));
    check(n_meas > 100, $sformatf("meter results: %0d", n_meas));
    check(n_ps == 0, "phase-shift outputs idle in the QPLL variant");
    $display("mechanisms: main_upd=%0d helper_upd=%0d glitch=%0d meas=%0d beats=%0d",
             n_main_upd, n_helper_upd, n_glitch, n_meas, beats);
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
