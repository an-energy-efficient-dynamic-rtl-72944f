// nbbp_frontend: branch prediction unit of a six-stage (A F D X M W)
// LatticeMico32-style pipeline, with the naive Bayes predictor moved from
// stage D to stage F so that it has two clock cycles before the branch
// executes in stage X.
//
// Stage F (cycle 1): the fetched word f_instr_i at f_pc_i is decoded by
// branch_decoder; for a conditional branch the NBBP starts its prediction with
// the same address. Stage D (cycle 2): the NBBP result is ready and the unit
// reports whether to redirect fetch and where:
//   d_redirect_o = d_valid_o & (unconditional | (conditional & NBBP taken))
//   d_target_o   = PC-relative branch destination.
// Unconditional PC-relative branches are always predicted taken. The history
// snapshot d_hist_o goes down the pipeline with the branch; when the branch
// executes (stage X), the pipeline returns its address, outcome and snapshot
// on the x_* port, which trains the predictor and shifts the history.
// Only conditional branches are predicted by, and train, the NBBP; the
// stage-D register of the decoder results, and the always-taken rule for
// unconditional branches, are this design's choices.
//
// d_score0_o/d_score1_o are the two class scores of the NBBP (meaningful for
// conditional branches) and gbh_o the live global history.
//
// Timing: f_* sampled at a rising edge, d_* valid in the following cycle;
// x_* sampled at a rising edge. Reset synchronous, active low.
module nbbp_frontend
  import nbbp_pkg::*;
#(
  parameter int unsigned HIST_LEN  = HIST_LEN_DEFAULT,
  parameter int unsigned ADDR_BITS = ADDR_BITS_DEFAULT,
  parameter int unsigned CNT_BITS  = CNT_BITS_DEFAULT,
  parameter int unsigned LUT_W     = LUT_W_DEFAULT,
  localparam int unsigned SUM_W    = $clog2(HIST_LEN + 2) + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // stage F: fetched instruction
  input  logic                f_valid_i,
  input  logic [31:0]         f_pc_i,
  input  logic [31:0]         f_instr_i,
  // stage D: prediction
  output logic                d_valid_o,
  output logic                d_is_cond_o,
  output logic                d_is_uncond_o,
  output logic                d_pred_taken_o,
  output logic                d_redirect_o,
  output logic [31:0]         d_target_o,
  output logic [HIST_LEN-1:0] d_hist_o,
  output logic [SUM_W-1:0]    d_score0_o,
  output logic [SUM_W-1:0]    d_score1_o,
  // stage X: resolved conditional branch
  input  logic                x_valid_i,
  input  logic [31:0]         x_pc_i,
  input  logic                x_taken_i,
  input  logic [HIST_LEN-1:0] x_hist_i,
  // current global branch history
  output logic [HIST_LEN-1:0] gbh_o
);

  logic        f_cond, f_uncond;
  logic [31:0] f_target;

  branch_decoder u_dec (
    .pc_i        (f_pc_i),
    .instr_i     (f_instr_i),
    .is_cond_o   (f_cond),
    .is_uncond_o (f_uncond),
    .target_o    (f_target)
  );

  logic             nb_valid, nb_taken;

  nbbp #(
    .HIST_LEN (HIST_LEN),
    .ADDR_BITS(ADDR_BITS),
    .CNT_BITS (CNT_BITS),
    .LUT_W    (LUT_W)
  ) u_nbbp (
    .clk           (clk),
    .rst_n         (rst_n),
    .pred_req_i    (f_valid_i && f_cond),
    .pred_pc_i     (f_pc_i),
    .pred_valid_o  (nb_valid),
    .pred_taken_o  (nb_taken),
    .pred_hist_o   (d_hist_o),
    .pred_score0_o (d_score0_o),
    .pred_score1_o (d_score1_o),
    .upd_valid_i   (x_valid_i),
    .upd_pc_i      (x_pc_i),
    .upd_taken_i   (x_taken_i),
    .upd_hist_i    (x_hist_i),
    .gbh_o         (gbh_o)
  );

  // F/D pipeline register for the decoder results.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d_valid_o     <= 1'b0;
      d_is_cond_o   <= 1'b0;
      d_is_uncond_o <= 1'b0;
    end else begin
      d_valid_o     <= f_valid_i;
      d_is_cond_o   <= f_valid_i && f_cond;
      d_is_uncond_o <= f_valid_i && f_uncond;
    end
    d_target_o <= f_target;
  end

  assign d_pred_taken_o = d_is_uncond_o || (d_is_cond_o && nb_taken);
  assign d_redirect_o   = d_valid_o && d_pred_taken_o;

  // The NBBP result must arrive exactly in the stage-D cycle of a conditional branch.
  a_nbbp_in_d: assert property (@(posedge clk) disable iff (!rst_n)
                                nb_valid == d_is_cond_o);

endmodule
