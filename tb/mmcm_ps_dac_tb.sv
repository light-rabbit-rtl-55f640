// Self-checking testbench of mmcm_ps_dac, the MMCM phase-shift DAC.
//
// The DUT drives a behavioural MMCM phase-shift port (mmcm_ps_model, PSDONE
// 12 cycles after PSEN). The testbench keeps its own reference: it knows
// that an accumulation step happens on every 12th clock edge after reset,
// adds the DAC magnitude (offset binary, complement below mid-scale) to a
// 15-bit accumulator and counts the signed carries. After each phase the
// DAC is set to mid-scale, the pipeline drains, and the net number of
// steps the MMCM made must equal the reference. Checked as well: direction
// of every step, the step rate (K*M/2^15 steps in K 12-cycle periods), no
// PSEN while a step is in flight, and the stall at full scale.
`timescale 1ns/1ps
module mmcm_ps_dac_tb;
  localparam int unsigned DAC_W = 16;
  localparam int unsigned PER   = 12;

  logic clk = 1'b0;
  logic rst;
  logic dac_load;
  logic [DAC_W-1:0] dac_value;
  logic psen, psincdec, psdone, stall;
  int   steps, violations;

  int checks = 0, failures = 0;
  int edge_k;            // clock edges since reset release
  int ref_acc, ref_net;  // reference accumulator and net step count
  logic [DAC_W-1:0] ref_dac;
  int n_psen, n_inc, n_dec, n_stall;

  always #4 clk = ~clk;

  mmcm_ps_dac #(.DAC_W(DAC_W), .PS_PERIOD(PER)) dut (
    .clk, .rst, .dac_load, .dac_value, .psen, .psincdec, .psdone, .stall);

  mmcm_ps_model #(.LATENCY(PER)) mmcm (
    .psclk(clk), .rst, .psen, .psincdec, .psdone, .steps, .violations);

  function automatic int mag_of(logic [DAC_W-1:0] d);
    logic [DAC_W-2:0] m;
    m = d[DAC_W-2:0];
    if (!d[DAC_W-1]) m = ~m;
    return int'(m);
  endfunction

  // Reference: step on every PER-th edge, with the DAC word loaded before.
  always @(posedge clk) begin
    if (rst) begin
      edge_k  = 0;
      ref_acc = 0;
      ref_net = 0;
      ref_dac = 16'h8000;
    end else begin
      edge_k = edge_k + 1;
      if (edge_k % PER == 0) begin
        ref_acc = ref_acc + mag_of(ref_dac);
        if (ref_acc >= 32768) begin
          ref_acc = ref_acc - 32768;
          ref_net = ref_net + (ref_dac[DAC_W-1] ? 1 : -1);
        end
      end
      if (dac_load) ref_dac = dac_value;
    end
  end

  // Outputs are sampled away from the active edge.
  always @(negedge clk) begin
    if (!rst) begin
      if (psen) begin
        n_psen = n_psen + 1;
        if (psincdec) n_inc = n_inc + 1; else n_dec = n_dec + 1;
      end
      if (stall) n_stall = n_stall + 1;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic do_reset();
    rst = 1'b1;
    dac_load = 1'b0;
    dac_value = '0;
    n_psen = 0; n_inc = 0; n_dec = 0; n_stall = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
  endtask

  task automatic load(logic [DAC_W-1:0] v);
    @(negedge clk);
    dac_load  = 1'b1;
    dac_value = v;
    @(negedge clk);
    dac_load  = 1'b0;
  endtask

  // Return to mid-scale and let waiting steps finish.
  task automatic drain();
    load(16'h8000);
    repeat (20 * PER) @(negedge clk);
  endtask

  initial begin
    // 1: +0x4000 for 120 periods: 60 increments, at one per 2 periods.
    do_reset();
    load(16'hC000);
    repeat (120 * PER - 2) @(negedge clk);
    drain();
    check(steps == ref_net, $sformatf("half scale up: net %0d ref %0d", steps, ref_net));
    check(ref_net >= 59 && ref_net <= 60, $sformatf("half scale up: rate, %0d steps in 120 periods", ref_net));
    check(n_dec == 0 && n_inc == steps, "half scale up: all steps increment");

    // 2: 0x4000 (below mid): magnitude 0x3FFF, decrements.
    do_reset();
    load(16'h4000);
    repeat (120 * PER - 2) @(negedge clk);
    drain();
    check(steps == ref_net, $sformatf("half scale down: net %0d ref %0d", steps, ref_net));
    check(steps <= -58 && steps >= -60, $sformatf("half scale down: rate %0d", steps));
    check(n_inc == 0, "half scale down: all steps decrement");

    // 3: mid-scale: no steps at all.
    do_reset();
    repeat (200 * PER) @(negedge clk);
    check(n_psen == 0 && steps == 0, "mid-scale makes no steps");

    // 4: small value: 0x8000 + 0x0100 -> 1 step per 128 periods.
    do_reset();
    load(16'h8100);
    repeat (256 * PER) @(negedge clk);
    drain();
    check(steps == ref_net && (steps == 2 || steps == 1),
          $sformatf("small value: %0d steps, ref %0d", steps, ref_net));

    // 5: random DAC words below the stall limit, changing sign.
    do_reset();
    for (int i = 0; i < 60; i++) begin
      logic [DAC_W-1:0] v;
      int m;
      m = int'($urandom_range(0, 24000));
      v = ($urandom_range(0, 1) == 1) ? 16'(32768 + m) : 16'(32767 - m);
      load(v);
      repeat ($urandom_range(5, 400)) @(negedge clk);
    end
    drain();
    check(steps == ref_net, $sformatf("random: net %0d ref %0d", steps, ref_net));
    check(n_inc > 0 && n_dec > 0, "random: both directions used");

    // 6: full scale: the MMCM limits the rate; stall must hold the steps
    // back instead of losing them.
    do_reset();
    load(16'hFFFF);
    repeat (130 * PER) @(negedge clk);
    check(n_stall > 0, "full scale: stall seen");
    check(n_psen >= 110 && n_psen <= 121,
          $sformatf("full scale: %0d steps in 130 periods (one per 13 cycles)", n_psen));
    drain();
    check(violations == 0, "no PSEN while a step is in flight");
    check(steps == n_psen, "every issued step completed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
