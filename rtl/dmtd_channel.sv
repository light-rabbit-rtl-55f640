// One DMTD (digital dual-mixer time difference) input channel.
//
// A clock of frequency f is sampled with an offset clock of frequency
// f * N/(N+1). The sampling instant slips by one input period / N per
// sample, so the sampled bit is a slow square wave, the beat, with a period
// of N offset-clock cycles; its phase is the phase of the input clock,
// magnified N+1 times in time. Comparing the beat edges of two inputs
// sampled by the same offset clock measures their phase difference with a
// resolution of one input period / N.
//
// Near each beat edge the sampled bit toggles randomly for a while, because
// the input edge and the sampling edge are almost aligned and jitter decides.
// The deglitcher (window DEGLITCH_W, 62 in the design) only accepts a rising
// beat edge after the bit has been low for DEGLITCH_W consecutive samples
// and then high for DEGLITCH_W consecutive samples. The tag is the value of
// the shared free-running counter at the first sample of that confirmed
// high run; a high run that ends early is reported as a glitch, and the
// channel, still armed, waits for the next high sample. This deglitch rule is this implementation's choice;
// the design gives only the window size.
//
// Interface: all in the clk_dmtd domain, rst synchronous active high.
// clk_in is asynchronous: it passes a sampling flip-flop and one more
// synchronizer stage, a latency of 2 cycles that is the same for every
// channel and cancels in tag differences. The counter value is captured in
// the cycle the first high sample reaches the deglitcher; tag_valid pulses
// for one cycle DEGLITCH_W - 1 cycles later, and tag holds its value until
// the next one.
module dmtd_channel #(
  parameter int unsigned TAG_W      = 16,
  parameter int unsigned DEGLITCH_W = 62
) (
  input  logic             clk_dmtd,
  input  logic             rst,
  input  logic             clk_in,
  input  logic [TAG_W-1:0] counter,
  output logic [TAG_W-1:0] tag,
  output logic             tag_valid,
  output logic             glitch
);

  localparam int unsigned CNT_W = $clog2(DEGLITCH_W + 1);
  localparam logic [CNT_W-1:0] RUN_DONE = CNT_W'(DEGLITCH_W - 1);

  typedef enum logic [1:0] {
    WAIT_LOW,   // waiting for DEGLITCH_W low samples
    WAIT_HIGH,  // armed: next high sample may be an edge
    CONFIRM     // counting high samples after a candidate edge
  } dg_state_e;

  logic             s_meta, s_bit;
  dg_state_e        state;
  logic [CNT_W-1:0] run;
  logic [TAG_W-1:0] cand;

  // Sampling flip-flop and one synchronizer stage.
  always_ff @(posedge clk_dmtd) begin
    s_meta <= clk_in;
    s_bit  <= s_meta;
  end

  always_ff @(posedge clk_dmtd) begin
    if (rst) begin
      state     <= WAIT_LOW;
      run       <= '0;
      cand      <= '0;
      tag       <= '0;
      tag_valid <= 1'b0;
      glitch    <= 1'b0;
    end else begin
      tag_valid <= 1'b0;
      glitch    <= 1'b0;
      unique case (state)
        WAIT_LOW: begin
          if (s_bit) begin
            run <= '0;
          end else if (run == RUN_DONE) begin
            run   <= '0;
            state <= WAIT_HIGH;
          end else begin
            run <= run + 1'b1;
          end
        end
        WAIT_HIGH: begin
          if (s_bit) begin
            cand  <= counter;
            run   <= '0;
            state <= CONFIRM;
          end
        end
        CONFIRM: begin
          if (!s_bit) begin
            glitch <= 1'b1;
            state  <= WAIT_HIGH;
          end else if (run == RUN_DONE - 1'b1) begin
            tag       <= cand;
            tag_valid <= 1'b1;
            run       <= '0;
            state     <= WAIT_LOW;
          end else begin
            run <= run + 1'b1;
          end
        end
        default: state <= WAIT_LOW;
      endcase
    end
  end

endmodule
