// nbc_classifier: the two-cycle naive Bayes classifier.
//
// For each class c in {0, 1} it picks, for every history position i, the
// counter p(x_i = hist_i[i], y = c) of the CPT entry and keeps its MSB; with
// the MSB of p(y = c) these HIST_LEN+1 bits stand for the terms of
//   log P(y=c|X) ~ log P(y=c) + sum_i log P(x_i|y=c).
// Their number of ones is the class score, computed by one nbc_posterior_sum
// per class (LUTs and adders, split in two by pipeline registers). The scores
// are compared in the second cycle: taken_o = 1 when score1_o > score0_o.
// Predicting not taken on a tie is this design's choice.
//
// Interface: valid_i, prior_i, row_i and hist_i are sampled at a rising edge
// (cycle 1); valid_o, taken_o and the scores are valid during cycle 2.
module nbc_classifier #(
  parameter int unsigned HIST_LEN = 30,
  parameter int unsigned CNT_BITS = 4,
  parameter int unsigned LUT_W    = 7,
  localparam int unsigned SUM_W   = $clog2(HIST_LEN + 2) + 1
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  input  logic                                        valid_i,
  input  logic [HIST_LEN-1:0]                         hist_i,
  input  logic [1:0][CNT_BITS-1:0]                    prior_i,
  input  logic [HIST_LEN-1:0][1:0][1:0][CNT_BITS-1:0] row_i,
  output logic                                        valid_o,
  output logic                                        taken_o,
  output logic [SUM_W-1:0]                            score0_o,
  output logic [SUM_W-1:0]                            score1_o
);

  // msbs[c] = {MSB of p(y=c), MSBs of p(x_i=hist_i, y=c) for i = HIST_LEN-1..0}
  logic [1:0][HIST_LEN:0] msbs;

  always_comb begin
    for (int unsigned c = 0; c < 2; c++) begin
      msbs[c][HIST_LEN] = prior_i[c][CNT_BITS-1];
      for (int unsigned i = 0; i < HIST_LEN; i++)
        msbs[c][i] = row_i[i][c][hist_i[i]][CNT_BITS-1];
    end
  end

  logic valid1_unused;

  nbc_posterior_sum #(.N_BITS(HIST_LEN + 1), .LUT_W(LUT_W)) u_sum0 (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_i (valid_i),
    .bits_i  (msbs[0]),
    .valid_o (valid_o),
    .sum_o   (score0_o)
  );

  nbc_posterior_sum #(.N_BITS(HIST_LEN + 1), .LUT_W(LUT_W)) u_sum1 (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_i (valid_i),
    .bits_i  (msbs[1]),
    .valid_o (valid1_unused),
    .sum_o   (score1_o)
  );

  assign taken_o = score1_o > score0_o;

endmodule
