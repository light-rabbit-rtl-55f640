// MMCM phase-shift "DAC": turns a SoftPLL DAC word into MMCM phase steps.
//
// On 7-series parts there is no fractional-N PLL in the fabric, so the
// frequency of an MMCM output is pulled by shifting its phase again and
// again. Each PSEN pulse moves the output by 1/56 of a VCO period; a steady
// stream of such steps at rate r changes the output period by r times that
// step, which acts like the frequency tuning of a VCXO.
//
// How it works: every PS_PERIOD (12) clock cycles the magnitude part of the
// DAC word is added to an accumulator of DAC_W-1 bits. Each carry out of the
// accumulator (its wrap-around) requests one phase step; the sign bit of
// the DAC word is the step direction and goes to PSINCDEC. The average step
// rate is therefore about |dac - 0x8000| / 2^(DAC_W-1) steps per 12 cycles: a
// first-order sigma-delta in time. Add-every-12-cycles, sign-to-PSINCDEC and
// carry-to-PSEN follow the design; the rest is this implementation's choice:
//   * The DAC word is offset binary (0x8000 = no shift). Above mid-scale the
//     low bits are the magnitude, below it their complement, so the step
//     rate grows monotonically on both sides of mid-scale.
//   * A step is only issued after the previous one has returned PSDONE.
//     Requests that must wait are held in a small signed pending count
//     (a request in the opposite direction cancels a waiting one). When the
//     count is full the 12-cycle accumulation step is held back and 'stall'
//     is high, so no request is ever lost.
//
// Interface: everything is in the PSCLK domain 'clk'; rst is synchronous,
// active high. dac_load takes dac_value; it is used from the next
// accumulation step on. psen is a one-cycle registered pulse; psincdec is
// registered with it and held in between.
module mmcm_ps_dac #(
  parameter int unsigned DAC_W     = 16,
  parameter int unsigned PS_PERIOD = 12,
  parameter int unsigned PEND_W    = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             dac_load,
  input  logic [DAC_W-1:0] dac_value,
  output logic             psen,
  output logic             psincdec,
  input  logic             psdone,
  output logic             stall
);

  localparam int unsigned MAG_W  = DAC_W - 1;
  localparam int unsigned TICK_W = (PS_PERIOD > 1) ? $clog2(PS_PERIOD) : 1;
  localparam logic [TICK_W-1:0] TICK_LAST = TICK_W'(PS_PERIOD - 1);
  localparam logic [PEND_W-1:0] PEND_MAX  = '1;

  logic [DAC_W-1:0]  dac_q;
  logic              sign;
  logic [MAG_W-1:0]  mag;
  logic [TICK_W-1:0] tick_cnt;
  logic              tick;
  logic [MAG_W-1:0]  acc;
  logic [MAG_W:0]    sum;
  logic [PEND_W-1:0] pend;      // number of waiting steps ...
  logic              pend_dir;  // ... all in this direction
  logic              busy;      // a step is in flight in the MMCM
  logic              step;      // accumulate this cycle
  logic              carry;     // accumulator wrapped: one more step wanted
  logic              issue;     // a waiting step goes out now

  assign sign  = dac_q[DAC_W-1];
  assign mag   = sign ? dac_q[MAG_W-1:0] : ~dac_q[MAG_W-1:0];
  assign tick  = (tick_cnt == TICK_LAST);
  assign stall = tick && (pend == PEND_MAX);
  assign step  = tick && !stall;
  assign sum   = {1'b0, acc} + {1'b0, mag};
  assign carry = step && sum[MAG_W];
  assign issue = (pend != '0) && !busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      dac_q    <= DAC_W'(1) << (DAC_W - 1);
      tick_cnt <= '0;
      acc      <= '0;
    end else begin
      if (dac_load) dac_q <= dac_value;
      if (!stall) tick_cnt <= tick ? '0 : tick_cnt + 1'b1;
      if (step) acc <= sum[MAG_W-1:0];
    end
  end

  // Pending count: +1 for a carry in the waiting direction (or when empty),
  // -1 for a carry in the other direction, -1 for every issued step.
  always_ff @(posedge clk) begin
    if (rst) begin
      pend     <= '0;
      pend_dir <= 1'b0;
      busy     <= 1'b0;
      psen     <= 1'b0;
      psincdec <= 1'b0;
    end else begin
      psen <= issue;
      if (issue) begin
        psincdec <= pend_dir;
        busy     <= 1'b1;
      end else if (psdone) begin
        busy <= 1'b0;
      end
      if (carry && (pend == '0 || sign == pend_dir)) begin
        // another step in the waiting direction; an issue this cycle
        // removes one again
        if (pend == '0) pend_dir <= sign;
        if (!issue) pend <= pend + 1'b1;
      end else if (carry) begin
        // opposite direction: cancels one waiting step
        pend <= issue ? pend - PEND_W'(2) : pend - 1'b1;
        if (issue && pend == PEND_W'(1)) begin
          pend     <= PEND_W'(1);
          pend_dir <= sign;
        end
      end else if (issue) begin
        pend <= pend - 1'b1;
      end
    end
  end

  // A new step may only start once the last one has completed.
  a_no_psen_while_busy: assert property (@(posedge clk) disable iff (rst)
    psen |-> !$past(busy));
  a_psdone_only_when_busy: assert property (@(posedge clk) disable iff (rst)
    psdone |-> busy);

endmodule
