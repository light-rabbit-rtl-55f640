// Light Rabbit node, fabric part: White Rabbit timing without VCXOs.
//
// A White Rabbit node normally steers two voltage-controlled crystal
// oscillators from its SoftPLL: a helper oscillator at f * N/(N+1), whose
// clock samples everything in the DMTD phase detectors, and the main
// oscillator, which becomes the node's time base and is locked to the clock
// recovered from the link. This top keeps the SoftPLL interface (16-bit DAC
// words and DMTD phase tags) and replaces each VCXO by an on-chip resource
// fed from a free-running board oscillator:
//   ACT_MMCM  (7-series, e.g. ZC706 / X310): one phase-shifting MMCM per
//             loop; mmcm_ps_dac turns the DAC word into a stream of 1/56-VCO
//             phase steps. A fabric PLL behind each MMCM cleans the steps.
//   ACT_QPLL  (UltraScale+, e.g. ZCU102): one QPLL per loop; qpll_sdm_dac
//             turns the DAC word into the QPLL fractional-N value. The main
//             QPLL and the Ethernet transceiver's QPLL get the same value at
//             the same time, so the link runs off the tuned clock.
// Alongside sits the D-DMTD meter that compares the node's 10 MHz output
// with the 10 MHz of a reference switch (N = 999, W = 62).
//
// Outside this module (ports instead): the SoftPLL soft core, which reads
// the tags and writes the DAC words; the MMCMs, cleaning PLLs, QPLLs and
// transceivers; the board oscillators.
//
// Clock domains: clk_sys is the DAC write clock and the PSCLK of both
// MMCMs (this implementation's choice); clk_dmtd is the helper clock, which
// samples the recovered RX clock (channel 0) and the main clock
// (channel 1); clk_ddmtd is the 9.99 MHz offset clock of the meter. Each
// domain has its own synchronous active-high reset. The outputs of the
// variant not selected by ACTUATOR are held at idle constants.
module light_rabbit_top
  import lr_pkg::*;
#(
  parameter actuator_e ACTUATOR = ACT_MMCM
) (
  // SoftPLL DAC writes (clk_sys)
  input  logic        clk_sys,
  input  logic        rst_sys,
  input  logic        helper_dac_load,
  input  dac_t        helper_dac,
  input  logic        main_dac_load,
  input  dac_t        main_dac,
  // MMCM variant: dynamic phase-shift ports of the helper and main MMCM
  output mmcm_ps_t    helper_ps,
  input  logic        helper_psdone,
  output mmcm_ps_t    main_ps,
  input  logic        main_psdone,
  output logic [1:0]  ps_stall,        // {main, helper}
  // QPLL variant: SDM data of QPLL1 (helper), QPLL2 (main), QPLL3 (ETH)
  output sdm_t        sdm_helper,
  output sdm_t        sdm_main,
  output sdm_t        sdm_eth,
  output logic [1:0]  sdm_update,      // {main and ETH, helper}
  output logic [1:0]  sdm_sat,
  // Phase detector (helper clock domain)
  input  logic        clk_dmtd,
  input  logic        rst_dmtd,
  input  logic        clk_rx,          // clock recovered from the link
  input  logic        clk_main,        // local main clock
  output logic [15:0] tag_rx,
  output logic [15:0] tag_main,
  output logic [1:0]  tag_valid,       // {main, rx}
  output logic [1:0]  tag_glitch,
  // D-DMTD 10 MHz meter (offset clock domain)
  input  logic        clk_ddmtd,
  input  logic        rst_ddmtd,
  input  logic        ten_mhz_node,
  input  logic        ten_mhz_switch,
  output logic        meas_valid,
  output logic [15:0] meas_phase,
  output logic [15:0] meas_period_node,
  output logic [15:0] meas_period_switch,
  output logic [31:0] meas_timestamp,
  output logic [15:0] meas_glitches
);

  // ---------------------------------------------------------------- DAC side
  if (ACTUATOR == ACT_MMCM) begin : g_mmcm
    mmcm_ps_dac #(.DAC_W(DAC_W), .PS_PERIOD(PS_PERIOD)) u_helper_ps (
      .clk       (clk_sys),
      .rst       (rst_sys),
      .dac_load  (helper_dac_load),
      .dac_value (helper_dac),
      .psen      (helper_ps.psen),
      .psincdec  (helper_ps.psincdec),
      .psdone    (helper_psdone),
      .stall     (ps_stall[0])
    );
    mmcm_ps_dac #(.DAC_W(DAC_W), .PS_PERIOD(PS_PERIOD)) u_main_ps (
      .clk       (clk_sys),
      .rst       (rst_sys),
      .dac_load  (main_dac_load),
      .dac_value (main_dac),
      .psen      (main_ps.psen),
      .psincdec  (main_ps.psincdec),
      .psdone    (main_psdone),
      .stall     (ps_stall[1])
    );
    assign sdm_helper = '0;
    assign sdm_main   = '0;
    assign sdm_eth    = '0;
    assign sdm_update = '0;
    assign sdm_sat    = '0;
  end else begin : g_qpll
    sdm_t sdm_main_q;
    qpll_sdm_dac #(.DAC_W(DAC_W), .SDM_W(SDM_W)) u_helper_sdm (
      .clk        (clk_sys),
      .rst        (rst_sys),
      .dac_load   (helper_dac_load),
      .dac_value  (helper_dac),
      .sdm_data   (sdm_helper),
      .sdm_update (sdm_update[0]),
      .sat        (sdm_sat[0])
    );
    qpll_sdm_dac #(.DAC_W(DAC_W), .SDM_W(SDM_W)) u_main_sdm (
      .clk        (clk_sys),
      .rst        (rst_sys),
      .dac_load   (main_dac_load),
      .dac_value  (main_dac),
      .sdm_data   (sdm_main_q),
      .sdm_update (sdm_update[1]),
      .sat        (sdm_sat[1])
    );
    // Main and ETH QPLL are tuned equally and simultaneously.
    assign sdm_main  = sdm_main_q;
    assign sdm_eth   = sdm_main_q;
    assign helper_ps = '0;
    assign main_ps   = '0;
    assign ps_stall  = '0;
  end

  // ----------------------------------------------------------- phase detect
  logic [1:0][15:0] tags;

  phase_detect #(.NCH(2), .TAG_W(16), .DEGLITCH_W(DEGLITCH_W)) u_pd (
    .clk_dmtd,
    .rst       (rst_dmtd),
    .clk_in    ({clk_main, clk_rx}),
    .tags,
    .tag_valid,
    .glitch    (tag_glitch)
  );
  assign tag_rx   = tags[0];
  assign tag_main = tags[1];

  // --------------------------------------------------------- D-DMTD meter
  ddmtd_meter #(.N(DDMTD_N), .DEGLITCH_W(DEGLITCH_W), .TAG_W(16), .TS_W(32)) u_meter (
    .clk_dmtd     (clk_ddmtd),
    .rst          (rst_ddmtd),
    .in_a         (ten_mhz_node),
    .in_b         (ten_mhz_switch),
    .meas_valid,
    .phase_diff   (meas_phase),
    .period_a     (meas_period_node),
    .period_b     (meas_period_switch),
    .timestamp    (meas_timestamp),
    .glitch_count (meas_glitches)
  );

endmodule
