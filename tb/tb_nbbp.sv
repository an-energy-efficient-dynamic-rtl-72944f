// tb_nbbp: checks the naive Bayes branch predictor core at its default size
// against the behavioural model of nbbp_ref_pkg. Each cycle a prediction may
// be requested for one of a few branch addresses (some aliasing the same
// table entry) and a random earlier request may be resolved with its history
// snapshot. Every prediction must be valid exactly one cycle after its
// request, and its taken bit, class scores and history snapshot must match
// the model; the live history must match after every update. As a sanity
// bound, a branch that is always taken and one that is never taken must be
// predicted correctly more than two times in three once trained (the random
// request gaps and resolution delays shift the history, which keeps the
// rate well below what a steady pipeline reaches).
module tb_nbbp;
  import nbbp_ref_pkg::*;
  localparam int L = 30, A = 8;
  logic clk = 1'b0, rst_n;
  logic pred_req, pred_valid, pred_taken;
  logic [31:0] pred_pc, upd_pc;
  logic [L-1:0] pred_hist, upd_hist, gbh;
  logic [5:0] s0, s1;
  logic upd_valid, upd_taken;
  int checks = 0, failures = 0;

  nbbp dut (
    .clk(clk), .rst_n(rst_n),
    .pred_req_i(pred_req), .pred_pc_i(pred_pc), .pred_valid_o(pred_valid),
    .pred_taken_o(pred_taken), .pred_hist_o(pred_hist),
    .pred_score0_o(s0), .pred_score1_o(s1),
    .upd_valid_i(upd_valid), .upd_pc_i(upd_pc), .upd_taken_i(upd_taken),
    .upd_hist_i(upd_hist), .gbh_o(gbh)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // Branch addresses: 0 and 4 alias (1 KiB apart); 1 always taken; 2 never.
  function automatic bit [31:0] br_pc(int b);
    bit [31:0] pcs[6] = '{32'h2000, 32'h2004, 32'h2008, 32'h200C, 32'h2400, 32'h2010};
    return pcs[b];
  endfunction

  function automatic bit br_outcome(int b, int n);
    case (b)
      1: return 1'b1;
      2: return 1'b0;
      3: return (n % 3) != 0;
      4: return (n % 4) == 1;
      5: return (n % 2) == 0;
      default: return (n % 5) < 2;
    endcase
  endfunction

  nbbp_model #(L, A, 4) m;

  initial begin
    bit        pv, ptaken;
    int        rr, round;
    int        pb, ps0, ps1, b, n_t1, n_t2, miss1, miss2;
    bit [L-1:0] phist;
    bit [31:0] q_pc[$];
    bit        q_t[$];
    bit [L-1:0] q_h[$];
    rr = 0; round = 0; n_t1 = 0; n_t2 = 0; miss1 = 0; miss2 = 0;
    m = new();
    rst_n = 1'b0; pred_req = 0; pred_pc = '0; upd_valid = 0; upd_pc = '0; upd_taken = 0; upd_hist = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    pv = 0; pb = 0; ptaken = 0; ps0 = 0; ps1 = 0; phist = '0;
    for (int c = 0; c < 8000; c++) begin
      check(pred_valid == pv, "prediction valid exactly one cycle after request");
      if (pv) begin
        check(pred_taken == ptaken, $sformatf("cycle %0d taken %0d exp %0d", c, pred_taken, ptaken));
        check(int'(s0) == ps0 && int'(s1) == ps1, "scores");
        check(pred_hist == phist, "history snapshot");
        if (c > 4000 && pb == 1) begin n_t1++; if (!pred_taken) miss1++; end
        if (c > 4000 && pb == 2) begin n_t2++; if (pred_taken) miss2++; end
      end
      check(gbh == m.ghist, "live history");
      // New request.
      pred_req = ($urandom % 3) != 0;
      b = rr;
      if (pred_req) begin
        rr = (rr + 1) % 6;
        if (rr == 0) round++;
      end
      pred_pc = br_pc(b);
      pv = pred_req; pb = b;
      phist = m.ghist;
      ptaken = m.predict(pred_pc, m.ghist);
      ps0 = m.score(pred_pc, m.ghist, 0);
      ps1 = m.score(pred_pc, m.ghist, 1);
      if (pred_req) begin
        q_pc.push_back(pred_pc);
        q_t.push_back(br_outcome(b, round));
        q_h.push_back(m.ghist);
      end
      // Resolve the oldest outstanding branch, at random times.
      upd_valid = (q_pc.size() > 2) || (q_pc.size() > 0 && ($urandom % 2) == 1);
      if (upd_valid) begin
        upd_pc = q_pc.pop_front();
        upd_taken = q_t.pop_front();
        upd_hist = q_h.pop_front();
        m.update(upd_pc, upd_taken, upd_hist);
      end
      @(negedge clk);
    end
    $display("trained: always-taken misses %0d/%0d, never-taken misses %0d/%0d", miss1, n_t1, miss2, n_t2);
    $display("saturations: high %0d low %0d", m.sat_hi_events, m.sat_lo_events);
    check(n_t1 > 0 && miss1 * 3 < n_t1, "always-taken branch learnt");
    check(n_t2 > 0 && miss2 * 3 < n_t2, "never-taken branch learnt");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
