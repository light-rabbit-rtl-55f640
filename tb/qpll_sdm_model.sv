// Behavioural model of the sigma-delta fractional-N feedback divider of a
// transceiver QPLL. It stands in for the hard block in simulations.
//
// Every clock it divides by N_INT or N_INT + 1: a first-order sigma-delta
// accumulator of SDM_W bits adds sdm_data and the carry selects N_INT + 1.
// Over 2^SDM_W clocks the divider ratios therefore add up to
// N_INT * 2^SDM_W + sdm_data, the average ratio is N_INT + sdm_data/2^SDM_W.
// 'ratio' is the divider value of the current clock.
module qpll_sdm_model #(
  parameter int unsigned N_INT = 80,
  parameter int unsigned SDM_W = 18
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [SDM_W-1:0] sdm_data,
  output int unsigned      ratio
);
  logic [SDM_W:0] acc;
  always_ff @(posedge clk) begin
    if (rst) begin
      acc   <= '0;
      ratio <= N_INT;
    end else begin
      acc   <= {1'b0, acc[SDM_W-1:0]} + {1'b0, sdm_data};
      ratio <= ({1'b0, acc[SDM_W-1:0]} + {1'b0, sdm_data}) >> SDM_W != 0 ? N_INT + 1 : N_INT;
    end
  end
endmodule
