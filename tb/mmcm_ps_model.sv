// Behavioural model of the dynamic phase-shift port of a 7-series MMCM
// (MMCME2_ADV: PSCLK, PSEN, PSINCDEC, PSDONE). Not synthesizable intent:
// it stands in for the hard primitive in simulations.
//
// A PSEN pulse sampled on a PSCLK edge starts one phase step; PSDONE is
// high for one cycle LATENCY (12) cycles after the PSEN cycle. The step
// moves the output phase by one 1/56 of a VCO period, counted here as a
// signed integer 'steps' (+1 for PSINCDEC = 1). A PSEN while a step is
// still in flight is counted in 'violations' and ignored.
module mmcm_ps_model #(
  parameter int unsigned LATENCY = 12
) (
  input  logic psclk,
  input  logic rst,
  input  logic psen,
  input  logic psincdec,
  output logic psdone,
  output int   steps,
  output int   violations
);
  logic busy;
  logic dir;
  int   cnt;

  always_ff @(posedge psclk) begin
    if (rst) begin
      busy       <= 1'b0;
      dir        <= 1'b0;
      cnt        <= 0;
      psdone     <= 1'b0;
      steps      <= 0;
      violations <= 0;
    end else begin
      psdone <= 1'b0;
      if (psen && busy) violations <= violations + 1;
      if (psen && !busy) begin
        busy <= 1'b1;
        dir  <= psincdec;
        cnt  <= 1;
      end else if (busy) begin
        if (cnt == int'(LATENCY) - 1) begin
          psdone <= 1'b1;
          busy   <= 1'b0;
          steps  <= dir ? steps + 1 : steps - 1;
        end else begin
          cnt <= cnt + 1;
        end
      end
    end
  end
endmodule
