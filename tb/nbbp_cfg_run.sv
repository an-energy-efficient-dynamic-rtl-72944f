// nbbp_cfg_run: testbench helper that runs one NBBP configuration against the
// behavioural model. A steady pipeline is modelled: each cycle a prediction
// is requested for the next of eight branches in turn (fixed periodic
// outcomes; two of them alias one table entry), and each branch is resolved
// two cycles after its request with its history snapshot. Every prediction's
// taken bit, scores and snapshot, and the live history, are compared with
// the model. The result is reported through the ports when done_o rises.
module nbbp_cfg_run #(
  parameter int L = 30,
  parameter int A = 8,
  parameter int C = 4,
  parameter int N_CYCLES = 1500
) (
  input  logic clk,
  input  logic rst_n,
  output logic done_o,
  output int   checks_o,
  output int   failures_o,
  output int   mispredicts_o,
  output int   predictions_o
);
  import nbbp_ref_pkg::*;
  localparam int SW = $clog2(L + 2) + 1;

  logic         pred_req, pred_valid, pred_taken;
  logic [31:0]  pred_pc, upd_pc;
  logic [L-1:0] pred_hist, upd_hist, gbh;
  logic [SW-1:0] s0, s1;
  logic         upd_valid, upd_taken;

  nbbp #(.HIST_LEN(L), .ADDR_BITS(A), .CNT_BITS(C)) dut (
    .clk(clk), .rst_n(rst_n),
    .pred_req_i(pred_req), .pred_pc_i(pred_pc), .pred_valid_o(pred_valid),
    .pred_taken_o(pred_taken), .pred_hist_o(pred_hist),
    .pred_score0_o(s0), .pred_score1_o(s1),
    .upd_valid_i(upd_valid), .upd_pc_i(upd_pc), .upd_taken_i(upd_taken),
    .upd_hist_i(upd_hist), .gbh_o(gbh)
  );

  function automatic bit outcome(int b, int k);
    case (b)
      0: return (k % 8) != 7;   // loop branch
      1: return k[0];           // alternating
      2: return 1'b0;           // never taken
      3: return 1'b1;           // always taken
      4: return (k % 3) == 0;
      5: return k[0];           // copies branch 1
      6: return (k % 5) < 3;
      default: return 1'b1;     // aliases branch 0's entry
    endcase
  endfunction

  function automatic bit [31:0] branch_pc(int b);
    if (b == 7) return 32'h4000 + (32'd1 << (A + 2));
    return 32'h4000 + 32'(4 * b);
  endfunction

  nbbp_model #(L, A, C) m;

  initial begin
    bit [31:0] q_pc[2];
    bit        q_t[2], q_v[2], pv, pt;
    bit [L-1:0] q_h[2], ph;
    int        ps0, ps1, b, k;
    int        checks, failures, miss, preds;
    done_o = 1'b0; checks_o = 0; failures_o = 0; mispredicts_o = 0; predictions_o = 0;
    checks = 0; failures = 0; miss = 0; preds = 0;
    m = new();
    pred_req = 0; pred_pc = '0; upd_valid = 0; upd_pc = '0; upd_taken = 0; upd_hist = '0;
    q_v[0] = 0; q_v[1] = 0; q_pc[0] = '0; q_pc[1] = '0; q_t[0] = 0; q_t[1] = 0;
    q_h[0] = '0; q_h[1] = '0;
    pv = 0; pt = 0; ph = '0; ps0 = 0; ps1 = 0;
    @(posedge rst_n);
    @(negedge clk);
    b = 0; k = 0;
    for (int c = 0; c < N_CYCLES; c++) begin
      checks++;
      if (pred_valid != pv) failures++;
      if (pv) begin
        checks += 3;
        if (pred_taken != pt) failures++;
        if (int'(s0) != ps0 || int'(s1) != ps1) failures++;
        if (pred_hist != ph) failures++;
        preds++;
        if (pred_taken != q_t[1]) miss++;
      end
      checks++;
      if (gbh != m.ghist) failures++;
      // Resolve the branch requested two cycles ago.
      upd_valid = q_v[0];
      upd_pc    = q_pc[0];
      upd_taken = q_t[0];
      upd_hist  = q_h[0];
      // New request.
      pred_req = 1'b1;
      pred_pc  = branch_pc(b);
      pv  = 1'b1;
      ph  = m.ghist;
      pt  = m.predict(pred_pc, m.ghist);
      ps0 = m.score(pred_pc, m.ghist, 0);
      ps1 = m.score(pred_pc, m.ghist, 1);
      q_v[0] = q_v[1]; q_pc[0] = q_pc[1]; q_t[0] = q_t[1]; q_h[0] = q_h[1];
      q_v[1] = 1'b1;   q_pc[1] = pred_pc; q_t[1] = outcome(b, k); q_h[1] = m.ghist;
      if (upd_valid) m.update(upd_pc, upd_taken, upd_hist);
      b++;
      if (b == 8) begin b = 0; k++; end
      @(negedge clk);
    end
    checks_o = checks; failures_o = failures; mispredicts_o = miss; predictions_o = preds;
    done_o = 1'b1;
  end
endmodule
