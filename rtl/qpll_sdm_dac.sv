// QPLL fractional-N "DAC": maps a SoftPLL DAC word onto the QPLL SDM value.
//
// UltraScale(+) GTH/GTY QPLLs have a sigma-delta fractional-N feedback
// divider: the divider toggles between N and N+1 so that on average it
// divides by N + SDMDATA/2^SDM_W. Changing SDMDATA while the QPLL runs
// tunes its output smoothly, which replaces the VCXO of a White Rabbit
// node. The reference is a fixed oscillator slightly below 125 MHz; the
// centre value CENTER_FRACN brings mid-scale DAC to the nominal frequency
// and the DAC word moves the value around that centre.
//
// Mapping (the 16-bit DAC, 18-bit SDM data, "centre plus offset" structure
// and the ~200 ppm range are the design's; the exact arithmetic is this
// implementation's choice):
//   offset   = (dac_value - 0x8000) >>> DAC_SHIFT       (signed)
//   sdm_data = clip(CENTER_FRACN + offset, 0, 2^SDM_W - 1)
// With N = 80 (10 GHz VCO from a 124.975605 MHz reference), one SDM unit is
// 1/(80 * 2^18) = 4.77e-8 of the frequency; DAC_SHIFT = 4 makes the whole
// DAC range 4096 units, i.e. 195 ppm. CENTER_FRACN = 4096 gives
// 124.975605 MHz * (80 + 4096/2^18) = 10.000 GHz at mid-scale.
//
// Interface: clk domain of the DAC write and of the SDM data port; rst
// synchronous, active high, loads the centre value. One cycle after
// dac_load, sdm_data holds the new value and sdm_update pulses for one
// cycle; sat tells that the last value was clipped. The same output may
// drive several QPLLs so that they are tuned together.
module qpll_sdm_dac #(
  parameter int unsigned DAC_W        = 16,
  parameter int unsigned SDM_W        = 18,
  parameter int unsigned CENTER_FRACN = 4096,
  parameter int unsigned DAC_SHIFT    = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             dac_load,
  input  logic [DAC_W-1:0] dac_value,
  output logic [SDM_W-1:0] sdm_data,
  output logic             sdm_update,
  output logic             sat
);

  localparam int unsigned SUM_W = ((SDM_W > DAC_W) ? SDM_W : DAC_W) + 2;
  localparam logic signed [SUM_W-1:0] SDM_MAX = SUM_W'((1 << SDM_W) - 1);

  logic signed [DAC_W-1:0] dac_signed;  // dac_value - mid-scale
  logic signed [SUM_W-1:0] offset;
  logic signed [SUM_W-1:0] sum;
  logic [SDM_W-1:0]        clipped;
  logic                    clip;

  always_comb begin
    dac_signed = {~dac_value[DAC_W-1], dac_value[DAC_W-2:0]};
    offset     = SUM_W'(dac_signed) >>> DAC_SHIFT;
    sum        = SUM_W'(CENTER_FRACN) + offset;
    clip       = 1'b0;
    if (sum < 0) begin
      clipped = '0;
      clip    = 1'b1;
    end else if (sum > SDM_MAX) begin
      clipped = '1;
      clip    = 1'b1;
    end else begin
      clipped = sum[SDM_W-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sdm_data   <= SDM_W'(CENTER_FRACN);
      sdm_update <= 1'b0;
      sat        <= 1'b0;
    end else begin
      sdm_update <= dac_load;
      if (dac_load) begin
        sdm_data <= clipped;
        sat      <= clip;
      end
    end
  end

endmodule
