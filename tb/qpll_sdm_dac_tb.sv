// Self-checking testbench of qpll_sdm_dac, the QPLL fractional-N DAC.
//
// Checks the mapping sdm = 4096 + (dac - 0x8000) / 16 (floor) against
// integer arithmetic for the corners and for random DAC words, the one-cycle
// latency and update strobe, the resulting tuning range in ppm (QPLL with
// N = 80 from a 124.975605 MHz reference, centre = 10 GHz), and clipping
// with a centre near either end of the SDM range. A behavioural sigma-delta
// divider shows that the SDM value is reached as an average of N and N+1.
`timescale 1ns/1ps
module qpll_sdm_dac_tb;
  localparam int unsigned SDM_W = 18;
  localparam real FREF_MHZ = 124.975605;

  logic clk = 1'b0;
  logic rst;
  logic dac_load;
  logic [15:0] dac_value;
  logic [SDM_W-1:0] sdm, sdm_lo, sdm_hi;
  logic upd, sat, upd_lo, sat_lo, upd_hi, sat_hi;
  int unsigned ratio;
  int checks = 0, failures = 0;
  int n_sat = 0;

  always #4 clk = ~clk;

  qpll_sdm_dac dut (.clk, .rst, .dac_load, .dac_value,
                    .sdm_data(sdm), .sdm_update(upd), .sat);
  qpll_sdm_dac #(.CENTER_FRACN(100)) dut_lo (.clk, .rst, .dac_load, .dac_value,
                    .sdm_data(sdm_lo), .sdm_update(upd_lo), .sat(sat_lo));
  qpll_sdm_dac #(.CENTER_FRACN(262100)) dut_hi (.clk, .rst, .dac_load, .dac_value,
                    .sdm_data(sdm_hi), .sdm_update(upd_hi), .sat(sat_hi));
  qpll_sdm_model #(.N_INT(80), .SDM_W(SDM_W)) qpll (.clk, .rst, .sdm_data(sdm), .ratio);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int expect_sdm(int center, logic [15:0] d);
    int v;
    v = center + ((int'(d) - 32768) >>> 4);
    if (v < 0) v = 0;
    if (v > 262143) v = 262143;
    return v;
  endfunction

  // Write one DAC word and check the three mappings one cycle later.
  task automatic write_check(logic [15:0] d);
    @(negedge clk);
    dac_load  = 1'b1;
    dac_value = d;
    @(negedge clk);
    dac_load  = 1'b0;
    check(upd && upd_lo && upd_hi, "update strobe one cycle after the write");
    check(int'(sdm) == expect_sdm(4096, d),
          $sformatf("dac %h -> sdm %0d, expected %0d", d, sdm, expect_sdm(4096, d)));
    check(int'(sdm_lo) == expect_sdm(100, d) && int'(sdm_hi) == expect_sdm(262100, d),
          $sformatf("dac %h: clipped mappings %0d %0d", d, sdm_lo, sdm_hi));
    check(sat_lo == (expect_sdm(100, d) == 0) && sat_hi == (expect_sdm(262100, d) == 262143),
          $sformatf("dac %h: saturation flags", d));
    if (sat_lo || sat_hi) n_sat++;
    @(negedge clk);
    check(!upd, "update strobe lasts one cycle");
  endtask

  function automatic real f_out_mhz(logic [SDM_W-1:0] s);
    return FREF_MHZ * (80.0 + real'(s) / 262144.0) / 80.0;
  endfunction

  initial begin
    real fmin, fmax, fmid;
    longint sum;
    rst = 1'b1; dac_load = 1'b0; dac_value = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(sdm == 18'd4096 && !sat, "reset value is the centre");

    write_check(16'h8000);
    check(sdm == 18'd4096, "mid-scale maps to the centre");
    fmid = f_out_mhz(sdm);
    check(fmid > 124.999875 && fmid < 125.000125, $sformatf("mid-scale gives 125 MHz within 1 ppm: %f", fmid));

    // Sigma-delta divider: 2^18 clocks average to 80 + 4096/2^18.
    sum = 0;
    for (int i = 0; i < 262144; i++) begin
      @(negedge clk);
      sum += longint'(ratio);
    end
    check(sum == 64'd80 * 262144 + 4096, $sformatf("SDM divider sum %0d", sum));

    write_check(16'h0000);
    check(sdm == 18'd2048, "bottom of the range");
    fmin = f_out_mhz(sdm);
    write_check(16'hFFFF);
    check(sdm == 18'd6143, "top of the range");
    fmax = f_out_mhz(sdm);
    check((fmax - fmin) / fmid * 1e6 > 190.0 && (fmax - fmin) / fmid * 1e6 < 210.0,
          $sformatf("tuning range %f ppm (about 200)", (fmax - fmin) / fmid * 1e6));

    for (int i = 0; i < 200; i++) write_check(16'($urandom));
    write_check(16'h0001);
    write_check(16'hFFFE);
    check(n_sat > 0, "saturation happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
