// Testbench clock source with run-time period, phase offset and jitter.
//
// Ideal edges are advanced by half_fs femtoseconds per half period (kept in
// fs so that ppm-level frequency offsets can be set), then offset_ps (a
// phase offset that may change while running) and uniform random jitter of
// +-jitter_ps are added, and the edge is placed at the nearest ps
// (timescale 1ps/1ps).
`timescale 1ps/1ps
module tb_clock_source (
  input  longint half_fs,
  input  longint offset_ps,
  input  int     jitter_ps,
  output logic   clk
);
  initial begin
    longint t_ideal_fs, d;
    int j;
    clk = 1'b0;
    t_ideal_fs = 1000000;
    forever begin
      j = 0;
      if (jitter_ps > 0) j = int'($urandom_range(0, 2 * jitter_ps)) - jitter_ps;
      d = (t_ideal_fs + 500) / 1000 + offset_ps + longint'(j) - longint'($time);
      if (d < 1) d = 1;
      #(d);
      clk = ~clk;
      t_ideal_fs = t_ideal_fs + half_fs;
    end
  end
endmodule
