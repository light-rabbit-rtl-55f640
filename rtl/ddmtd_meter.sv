// D-DMTD meter: in-fabric comparison of two 10 MHz clocks.
//
// The node's 10 MHz output (in_a) and the 10 MHz of a reference White
// Rabbit switch (in_b) are both sampled by an offset clock of
// 10 MHz * N/(N+1) = 9.99 MHz (N = 999, from an external jitter cleaner).
// While the sampling clock slips by one input period, N samples are taken:
// each input shows a beat of N = 999 offset-clock cycles, and one sample
// step is 100 ns / N = 100.1 ps of input phase. After deglitching (window
// W = 62) each rising beat edge is tagged with a shared free-running
// counter. From the tags the meter derives:
//   phase_diff  tag_b - tag_a modulo N, in counts of 100.1 ps of input
//               phase; positive when in_b lags in_a
//   period_a/b  difference of successive tags of one input; N when the
//               input is exactly (N+1)/N times the offset clock, and
//               about (period - N) / N^2 is its relative frequency error
//   timestamp   the free-running counter when the result was produced
// N, W and the list of outputs are those of the design; the moment results
// are produced, the widths and the modulo reduction are this
// implementation's choices.
//
// Interface: clk_dmtd is the offset clock, rst synchronous active high;
// in_a and in_b are asynchronous. A result is produced for every tag of
// in_b once in_a has been tagged: meas_valid pulses for one cycle with
// phase_diff, period_a, period_b and timestamp. phase_diff is correct while
// tag_b follows tag_a by less than 2N cycles. The 32-bit timestamp wraps
// after 2^32 cycles (430 s at 9.99 MHz); longer records must extend it.
module ddmtd_meter #(
  parameter int unsigned N          = 999,
  parameter int unsigned DEGLITCH_W = 62,
  parameter int unsigned TAG_W      = 16,
  parameter int unsigned TS_W       = 32
) (
  input  logic             clk_dmtd,
  input  logic             rst,
  input  logic             in_a,
  input  logic             in_b,
  output logic             meas_valid,
  output logic [TAG_W-1:0] phase_diff,
  output logic [TAG_W-1:0] period_a,
  output logic [TAG_W-1:0] period_b,
  output logic [TS_W-1:0]  timestamp,
  output logic [15:0]      glitch_count
);

  localparam logic [TAG_W-1:0] BEAT = TAG_W'(N);  // samples per beat

  logic [TS_W-1:0]  counter;
  logic [TAG_W-1:0] tag_a, tag_b, last_a, last_b;
  logic             val_a, val_b, gl_a, gl_b;
  logic             have_a, have_b;
  logic [TAG_W-1:0] diff_raw;

  always_ff @(posedge clk_dmtd) begin
    if (rst) counter <= '0;
    else     counter <= counter + 1'b1;
  end

  dmtd_channel #(.TAG_W(TAG_W), .DEGLITCH_W(DEGLITCH_W)) u_a (
    .clk_dmtd, .rst, .clk_in(in_a), .counter(counter[TAG_W-1:0]),
    .tag(tag_a), .tag_valid(val_a), .glitch(gl_a));

  dmtd_channel #(.TAG_W(TAG_W), .DEGLITCH_W(DEGLITCH_W)) u_b (
    .clk_dmtd, .rst, .clk_in(in_b), .counter(counter[TAG_W-1:0]),
    .tag(tag_b), .tag_valid(val_b), .glitch(gl_b));

  // Tag b against the latest tag of a; a tag of a in the same cycle counts.
  assign diff_raw = tag_b - (val_a ? tag_a : last_a);

  always_ff @(posedge clk_dmtd) begin
    if (rst) begin
      last_a       <= '0;
      last_b       <= '0;
      have_a       <= 1'b0;
      have_b       <= 1'b0;
      period_a     <= '0;
      period_b     <= '0;
      phase_diff   <= '0;
      timestamp    <= '0;
      meas_valid   <= 1'b0;
      glitch_count <= '0;
    end else begin
      meas_valid <= 1'b0;
      if (val_a) begin
        last_a <= tag_a;
        have_a <= 1'b1;
        if (have_a) period_a <= tag_a - last_a;
      end
      if (val_b) begin
        last_b <= tag_b;
        have_b <= 1'b1;
        if (have_b) period_b <= tag_b - last_b;
        if (have_a || val_a) begin
          phase_diff <= (diff_raw >= BEAT) ? diff_raw - BEAT : diff_raw;
          timestamp  <= counter;
          meas_valid <= 1'b1;
        end
      end
      if (gl_a || gl_b) glitch_count <= glitch_count + ((gl_a && gl_b) ? 16'd2 : 16'd1);
    end
  end

endmodule
