// nbbp_trainer: training logic of the naive Bayes branch predictor.
//
// Given the old P(y) counters and CPT entry of the executed branch, the
// branch outcome t and the history x the prediction was made with, it
// computes the new counter values:
//   P(y):  p(y=t) is incremented, p(y=!t) decremented;
//   CPT:   for every i, in the y=t row p(x_i, y=t) is incremented and
//          p(!x_i, y=t) decremented; the y=!t row is left unchanged.
// All counters saturate at 0 and at all ones. Training happens on every
// executed conditional branch, whether it was predicted correctly or not.
//
// Interface: purely combinational; the tables write the result back at the
// next rising edge.
module nbbp_trainer #(
  parameter int unsigned HIST_LEN = 30,
  parameter int unsigned CNT_BITS = 4
) (
  input  logic                                        outcome_i,
  input  logic [HIST_LEN-1:0]                         hist_i,
  input  logic [1:0][CNT_BITS-1:0]                    prior_i,
  input  logic [HIST_LEN-1:0][1:0][1:0][CNT_BITS-1:0] row_i,
  output logic [1:0][CNT_BITS-1:0]                    prior_o,
  output logic [HIST_LEN-1:0][1:0][1:0][CNT_BITS-1:0] row_o
);

  function automatic logic [CNT_BITS-1:0] sat_up(input logic [CNT_BITS-1:0] v);
    return (&v) ? v : v + 1'b1;
  endfunction

  function automatic logic [CNT_BITS-1:0] sat_down(input logic [CNT_BITS-1:0] v);
    return (v == '0) ? v : v - 1'b1;
  endfunction

  always_comb begin
    prior_o                    = prior_i;
    prior_o[outcome_i]         = sat_up(prior_i[outcome_i]);
    prior_o[!outcome_i]        = sat_down(prior_i[!outcome_i]);
    row_o                      = row_i;
    for (int unsigned i = 0; i < HIST_LEN; i++) begin
      row_o[i][outcome_i][hist_i[i]]  = sat_up(row_i[i][outcome_i][hist_i[i]]);
      row_o[i][outcome_i][!hist_i[i]] = sat_down(row_i[i][outcome_i][!hist_i[i]]);
    end
  end

endmodule
