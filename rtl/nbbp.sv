// nbbp: naive Bayes branch predictor core.
//
// The branch address bits pc[PC_LSB +: ADDR_BITS] select one entry of the
// P(y) table and of the CPT (2^ADDR_BITS entries each). The global branch
// history (gbh) supplies the features x_1..x_l. The classifier turns the
// selected counters into two class scores and compares them; the result is
// available in the cycle after the request, i.e. the prediction takes two
// clock cycles. When a conditional branch is executed, the trainer updates
// the P(y) and CPT entry of its address with its outcome, and the outcome is
// shifted into the history.
//
// Prediction port: pred_req_i/pred_pc_i sampled at a rising edge; in the
// next cycle pred_valid_o, pred_taken_o and pred_hist_o (the history the
// prediction was made with) are valid. The pipeline should carry pred_hist_o
// with the branch and return it as upd_hist_i, so that training sees the
// same features as the prediction.
// Update port: upd_valid_i, upd_pc_i, upd_taken_i, upd_hist_i sampled at a
// rising edge, one update per cycle, written at that edge. A prediction in
// the same cycle as an update reads the tables and history before the update.
// Taking the index straight from the low word-address bits (no further
// hashing), and carrying the history snapshot, are this design's choices.
module nbbp
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
  // prediction
  input  logic                pred_req_i,
  input  logic [31:0]         pred_pc_i,
  output logic                pred_valid_o,
  output logic                pred_taken_o,
  output logic [HIST_LEN-1:0] pred_hist_o,
  output logic [SUM_W-1:0]    pred_score0_o,
  output logic [SUM_W-1:0]    pred_score1_o,
  // training
  input  logic                upd_valid_i,
  input  logic [31:0]         upd_pc_i,
  input  logic                upd_taken_i,
  input  logic [HIST_LEN-1:0] upd_hist_i,
  // current global history
  output logic [HIST_LEN-1:0] gbh_o
);

  typedef logic [HIST_LEN-1:0][1:0][1:0][CNT_BITS-1:0] row_t;
  typedef logic [1:0][CNT_BITS-1:0]                    prior_t;

  logic [ADDR_BITS-1:0] rd_idx, upd_idx;
  assign rd_idx  = pred_pc_i[PC_LSB +: ADDR_BITS];
  assign upd_idx = upd_pc_i[PC_LSB +: ADDR_BITS];

  prior_t rd_prior, upd_prior_old, upd_prior_new;
  row_t   rd_row, upd_row_old, upd_row_new;

  gbh #(.HIST_LEN(HIST_LEN)) u_gbh (
    .clk       (clk),
    .rst_n     (rst_n),
    .shift_i   (upd_valid_i),
    .outcome_i (upd_taken_i),
    .hist_o    (gbh_o)
  );

  prior_table #(.ADDR_BITS(ADDR_BITS), .CNT_BITS(CNT_BITS)) u_prior (
    .clk         (clk),
    .rst_n       (rst_n),
    .rd_idx_i    (rd_idx),
    .rd_data_o   (rd_prior),
    .upd_idx_i   (upd_idx),
    .upd_rdata_o (upd_prior_old),
    .upd_we_i    (upd_valid_i),
    .upd_wdata_i (upd_prior_new)
  );

  cpt #(.HIST_LEN(HIST_LEN), .ADDR_BITS(ADDR_BITS), .CNT_BITS(CNT_BITS)) u_cpt (
    .clk        (clk),
    .rst_n      (rst_n),
    .rd_idx_i   (rd_idx),
    .rd_row_o   (rd_row),
    .upd_idx_i  (upd_idx),
    .upd_rrow_o (upd_row_old),
    .upd_we_i   (upd_valid_i),
    .upd_wrow_i (upd_row_new)
  );

  nbbp_trainer #(.HIST_LEN(HIST_LEN), .CNT_BITS(CNT_BITS)) u_train (
    .outcome_i (upd_taken_i),
    .hist_i    (upd_hist_i),
    .prior_i   (upd_prior_old),
    .row_i     (upd_row_old),
    .prior_o   (upd_prior_new),
    .row_o     (upd_row_new)
  );

  nbc_classifier #(.HIST_LEN(HIST_LEN), .CNT_BITS(CNT_BITS), .LUT_W(LUT_W)) u_nbc (
    .clk      (clk),
    .rst_n    (rst_n),
    .valid_i  (pred_req_i),
    .hist_i   (gbh_o),
    .prior_i  (rd_prior),
    .row_i    (rd_row),
    .valid_o  (pred_valid_o),
    .taken_o  (pred_taken_o),
    .score0_o (pred_score0_o),
    .score1_o (pred_score1_o)
  );

  // History snapshot travelling with the prediction.
  always_ff @(posedge clk) begin
    pred_hist_o <= gbh_o;
  end

endmodule
