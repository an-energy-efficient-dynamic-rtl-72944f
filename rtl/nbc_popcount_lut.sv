// nbc_popcount_lut: look-up table that returns how many of its W input bits
// are 1.
//
// In the naive Bayes classifier each selected counter contributes only its
// MSB to the log-posterior score, so adding the scores reduces to counting
// ones. The bits are split into small groups and each group is counted by one
// table like this one (W = 7 in the main configuration, with a 3-bit result).
// The table contents are the population count of the index; it is written
// as a loop so that synthesis builds the table for any W.
//
// Interface: purely combinational, in[W-1:0] -> count[$clog2(W+1)-1:0].
module nbc_popcount_lut #(
  parameter int unsigned W = 7
) (
  input  logic [W-1:0]             in,
  output logic [$clog2(W+1)-1:0]   count
);

  always_comb begin
    count = '0;
    for (int unsigned k = 0; k < W; k++)
      count = count + {{($clog2(W+1)-1){1'b0}}, in[k]};
  end

endmodule
