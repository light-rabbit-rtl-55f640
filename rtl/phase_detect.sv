// Phase detector of the node: a group of DMTD channels on one time base.
//
// The SoftPLL of a White Rabbit node measures phase with DMTDs: every clock
// it must compare (the clock recovered from the link and the node's own
// main clock) is sampled by the helper clock, which runs at f * N/(N+1).
// Each channel reports a phase tag per beat period; the SoftPLL subtracts
// tags to get the phase error of the main loop and takes successive tags of
// one channel for the frequency error of the helper loop. All channels
// share one free-running counter so that their tags can be subtracted.
// Two channels by default (recovered RX clock and local main clock); that
// both detectors of the node share one counter is this implementation's
// choice.
//
// Interface: clk_dmtd is the helper clock, rst synchronous active high.
// clk_in[i] is the asynchronous clock of channel i; tags[i] and
// tag_valid[i] are its latest tag and one-cycle new-tag strobe
// (see dmtd_channel for the timing).
module phase_detect #(
  parameter int unsigned NCH        = 2,
  parameter int unsigned TAG_W      = 16,
  parameter int unsigned DEGLITCH_W = 62
) (
  input  logic                      clk_dmtd,
  input  logic                      rst,
  input  logic [NCH-1:0]            clk_in,
  output logic [NCH-1:0][TAG_W-1:0] tags,
  output logic [NCH-1:0]            tag_valid,
  output logic [NCH-1:0]            glitch
);

  logic [TAG_W-1:0] counter;

  always_ff @(posedge clk_dmtd) begin
    if (rst) counter <= '0;
    else     counter <= counter + 1'b1;
  end

  for (genvar i = 0; i < NCH; i++) begin : g_ch
    dmtd_channel #(.TAG_W(TAG_W), .DEGLITCH_W(DEGLITCH_W)) u_ch (
      .clk_dmtd,
      .rst,
      .clk_in    (clk_in[i]),
      .counter,
      .tag       (tags[i]),
      .tag_valid (tag_valid[i]),
      .glitch    (glitch[i])
    );
  end

endmodule
