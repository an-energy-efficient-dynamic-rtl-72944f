// gbh: global branch history register, the predictor's instruction-feature
// extractor.
//
// An HIST_LEN-bit shift register of the outcomes of the most recently executed
// conditional branches (1 = taken). Bit k holds feature x_(k+1); a new outcome
// enters at x_l (bit HIST_LEN-1) and the oldest, x_1 (bit 0), drops out.
// The history is shifted when a branch is executed (resolved), not when it is
// predicted; clearing it to all zeros at reset is this design's choice.
//
// Interface: shift_i/outcome_i sampled at the rising edge; hist_o is the
// register value. Reset is synchronous, active low.
module gbh #(
  parameter int unsigned HIST_LEN = 30
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                shift_i,
  input  logic                outcome_i,
  output logic [HIST_LEN-1:0] hist_o
);

  always_ff @(posedge clk) begin
    if (!rst_n)       hist_o <= '0;
    else if (shift_i) hist_o <= {outcome_i, hist_o[HIST_LEN-1:1]};
  end

endmodule
