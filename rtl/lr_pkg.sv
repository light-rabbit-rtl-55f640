// Shared types and constants of the Light Rabbit fabric logic.
//
// A Light Rabbit node keeps the White Rabbit SoftPLL unchanged but replaces
// the two VCXOs it normally steers (helper/DMTD oscillator and main
// oscillator) by on-chip clocking resources: either MMCMs that are phase
// shifted continuously, or transceiver QPLLs whose fractional-N value is
// changed on the fly. The SoftPLL still writes 16-bit DAC words; the blocks
// of this design translate those words for the chosen clocking resource.
//
// The 16-bit DAC width, the 18-bit SDM width, the 12-cycle phase-shift
// interval, N = 999 and W = 62 are the figures of the design; the DAC
// coding (offset binary, 0x8000 = centre) is this design's choice, the
// usual coding of a VCXO DAC.
package lr_pkg;

  localparam int unsigned DAC_W = 16;          // SoftPLL DAC word
  localparam int unsigned SDM_W = 18;          // QPLL SDM[0/1]DATA
  localparam int unsigned PS_PERIOD = 12;      // MMCM PSEN-to-PSDONE interval
  localparam int unsigned DDMTD_N = 999;       // offset clock = f * N/(N+1)
  localparam int unsigned DEGLITCH_W = 62;     // deglitch window in samples

  typedef logic [DAC_W-1:0] dac_t;
  typedef logic [SDM_W-1:0] sdm_t;

  // Which on-chip resource replaces the VCXOs.
  typedef enum logic [0:0] {
    ACT_MMCM = 1'b0,   // 7-series fabric: MMCM dynamic phase shift
    ACT_QPLL = 1'b1    // UltraScale(+): QPLL sigma-delta fractional-N
  } actuator_e;

  // MMCM dynamic phase-shift request (outputs towards one MMCM).
  typedef struct packed {
    logic psen;
    logic psincdec;
  } mmcm_ps_t;

endpackage
