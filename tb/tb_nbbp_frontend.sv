// tb_nbbp_frontend: end-to-end test of the fetch-stage branch prediction
// unit at its default sizes (30-bit history, 256 entries, 4-bit counters).
//
// A small looping program is fed through stage F one word per cycle, with
// random fetch bubbles. It holds a loop-closing branch (taken 7 of 8 times),
// an alternating branch, a branch that repeats the alternating one's outcome,
// an always-not-taken branch, a random branch, a branch whose address aliases
// the loop branch's table entry (resolved in the cycle another such branch is
// fetched), unconditional bi/calli and plain ALU
// instructions. Each conditional branch is resolved two cycles after fetch
// (stage X) with its outcome and the history snapshot the unit reported in
// stage D. Every stage-D output is compared with a behavioural model
// (nbbp_ref_pkg). The test also counts how often each mechanism occurred:
// taken and not-taken predictions, ties between the class scores,
// unconditional redirects, non-branches, counters saturating high and low,
// a prediction and an update of the same entry in one cycle, history shifts
// and mispredictions. A mechanism that never occurred counts as a failure,
// as does a poor accuracy, once trained, on the alternating and the
// never-taken branch (the aliased branches fight over one entry, and the
// correlated branch sees the random one in its history, so their rates are
// only reported).
module tb_nbbp_frontend;
  import nbbp_ref_pkg::*;

  localparam int L = 30;
  localparam int A = 8;
  localparam int N_CYCLES = 6000;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        f_valid;
  logic [31:0] f_pc, f_instr;
  logic        d_valid, d_is_cond, d_is_uncond, d_pred_taken, d_redirect;
  logic [31:0] d_target;
  logic [L-1:0] d_hist, gbh;
  logic [5:0]  d_score0, d_score1;
  logic        x_valid, x_taken;
  logic [31:0] x_pc;
  logic [L-1:0] x_hist;

  nbbp_frontend dut (
    .clk            (clk),
    .rst_n          (rst_n),
    .f_valid_i      (f_valid),
    .f_pc_i         (f_pc),
    .f_instr_i      (f_instr),
    .d_valid_o      (d_valid),
    .d_is_cond_o    (d_is_cond),
    .d_is_uncond_o  (d_is_uncond),
    .d_pred_taken_o (d_pred_taken),
    .d_redirect_o   (d_redirect),
    .d_target_o     (d_target),
    .d_hist_o       (d_hist),
    .d_score0_o     (d_score0),
    .d_score1_o     (d_score1),
    .x_valid_i      (x_valid),
    .x_pc_i         (x_pc),
    .x_taken_i      (x_taken),
    .x_hist_i       (x_hist),
    .gbh_o          (gbh)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  // Watchdog.
  initial begin
    repeat (N_CYCLES + 1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    bit        valid;
    bit        cond;
    bit        uncond;
    bit [31:0] pc;
    bit [31:0] target;
    bit        outcome;
    bit        exp_taken;
    int        exp_s0, exp_s1;
    bit [L-1:0] exp_hist;
    int        kind;
  } slot_t;

  localparam bit [31:0] BASE = 32'h0000_1000;
  localparam int NSLOT = 10;

  // Program slot s of loop iteration k: returns the word and the outcome.
  function automatic void program_slot(int s, int k, output bit [31:0] pc,
                                       output bit [31:0] instr, output bit outcome,
                                       output bit [31:0] target, output bit cond,
                                       output bit uncond);
    bit [15:0] imm16;
    bit [25:0] imm26;
    pc      = BASE + 32'(4 * s);
    outcome = 1'b0;
    cond    = 1'b0;
    uncond  = 1'b0;
    imm16   = 16'hFFF8;                       // -8 words
    imm26   = 26'h0000_040;                   // +64 words
    instr   = {6'h2D, 5'd1, 5'd2, 5'd3, 11'd0}; // add r3, r1, r2
    case (s)
      1: begin instr = {6'h11, 5'd1, 5'd2, imm16}; outcome = (k % 8) != 7; cond = 1; end // be
      2: begin instr = {6'h17, 5'd1, 5'd2, 16'h0010}; outcome = k[0]; cond = 1; end       // bne
      3: begin                                                                           // be, aliases slot 1
           pc = BASE + 32'd12 + 32'd2040;
           instr = {6'h11, 5'd10, 5'd11, 16'h0020}; outcome = (k % 8) != 7; cond = 1;
         end
      4: begin instr = {6'h12, 5'd4, 5'd5, 16'h0004}; outcome = k[0]; cond = 1; end       // bg
      5: begin instr = {6'h13, 5'd4, 5'd5, 16'h7FFF}; outcome = 1'b0; cond = 1; end       // bge
      6: begin instr = {6'h14, 5'd6, 5'd7, 16'h8000}; outcome = 1'($urandom); cond = 1; end // bgeu
      7: begin instr = {6'h38, imm26}; uncond = 1; end                                   // bi
      8: begin                                                                           // bgu, aliases slot 1
           pc = BASE + 32'd4 + 32'd1024;
           instr = {6'h15, 5'd8, 5'd9, 16'h0002}; outcome = 1'b1; cond = 1;
         end
      9: begin instr = {6'h3E, 26'h3FF_FFF0}; uncond = 1; end                           // calli
      default: ;
    endcase
    if (uncond) target = pc + {{4{instr[25]}}, instr[25:0], 2'b00};
    else        target = pc + {{14{instr[15]}}, instr[15:0], 2'b00};
  endfunction

  nbbp_model #(L, A, 4) m;
  slot_t in_d, prev_d, in_x;

  int n_taken = 0, n_not_taken = 0, n_tie = 0, n_uncond = 0, n_nonbranch = 0;
  int n_same_entry = 0, n_shift = 0, n_mispred = 0, n_bubble = 0;
  int late_cond = 0, late_miss = 0;
  int slot_miss [NSLOT] = '{default: 0};
  int slot_late [NSLOT] = '{default: 0};

  initial begin
    int s, k;
    bit [31:0] pc, instr, target;
    bit outcome, cond, uncond;
    slot_t nw;

    m = new();
    rst_n   = 1'b0;
    f_valid = 1'b0; f_pc = '0; f_instr = '0;
    x_valid = 1'b0; x_pc = '0; x_taken = 1'b0; x_hist = '0;
    in_d = '{default: 0};
    in_x = '{default: 0};
    prev_d = '{default: 0};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    check(gbh == '0, "history clear after reset");

    s = 0; k = 0;
    for (cycle = 0; cycle < N_CYCLES; cycle++) begin
      // Stage D: outputs for the word fetched in the previous cycle.
      check(d_valid == in_d.valid, "d_valid");
      check(d_is_cond == (in_d.valid && in_d.cond), "d_is_cond");
      check(d_is_uncond == (in_d.valid && in_d.uncond), "d_is_uncond");
      if (in_d.valid && (in_d.cond || in_d.uncond)) begin
        check(d_target == in_d.target, $sformatf("target %h vs %h", d_target, in_d.target));
      end
      if (in_d.valid && in_d.cond) begin
        check(d_pred_taken == in_d.exp_taken,
              $sformatf("prediction pc=%h got %0d exp %0d", in_d.pc, d_pred_taken, in_d.exp_taken));
        check(int'(d_score0) == in_d.exp_s0 && int'(d_score1) == in_d.exp_s1,
              $sformatf("scores %0d/%0d exp %0d/%0d", d_score0, d_score1, in_d.exp_s0, in_d.exp_s1));
        check(d_hist == in_d.exp_hist, "history snapshot");
        in_d.exp_hist = d_hist;  // carried to stage X as the pipeline would
        if (d_pred_taken) n_taken++; else n_not_taken++;
        if (d_score0 == d_score1) n_tie++;
        if (d_pred_taken != in_d.outcome) n_mispred++;
        if (cycle > N_CYCLES / 2) slot_late[in_d.kind]++;
        if (cycle > N_CYCLES / 2 && (in_d.kind == 2 || in_d.kind == 5)) begin
          late_cond++;
          if (d_pred_taken != in_d.outcome) late_miss++;
        end
        if (cycle > N_CYCLES / 2 && d_pred_taken != in_d.outcome) slot_miss[in_d.kind]++;
      end
      if (in_d.valid && in_d.uncond) begin
        check(d_redirect, "unconditional branch redirects");
        n_uncond++;
      end else if (in_d.valid && in_d.cond) begin
        check(d_redirect == in_d.exp_taken, "conditional redirect");
      end else begin
        check(!d_redirect, "no redirect for non-branch or bubble");
        if (in_d.valid) n_nonbranch++;
      end
      check(gbh == m.ghist, "live history");

      // Stage X: resolve the branch that was in D one cycle ago.
      in_x = prev_d;
      prev_d = in_d;
      x_valid = in_x.valid && in_x.cond;
      x_pc    = in_x.pc;
      x_taken = in_x.outcome;
      x_hist  = in_x.exp_hist;

      // Stage F: next word of the program, or a bubble.
      nw = '{default: 0};
      if (($urandom % 8) == 0) begin
        f_valid = 1'b0;
        f_pc    = 32'($urandom);
        f_instr = 32'($urandom);
        n_bubble++;
      end else begin
        program_slot(s, k, pc, instr, outcome, target, cond, uncond);
        f_valid = 1'b1;
        f_pc = pc;
        f_instr = instr;
        nw.valid = 1; nw.cond = cond; nw.uncond = uncond; nw.pc = pc;
        nw.outcome = outcome; nw.target = target; nw.kind = s;
        if (cond) begin
          nw.exp_hist  = m.ghist;
          nw.exp_taken = m.predict(pc, m.ghist);
          nw.exp_s0    = m.score(pc, m.ghist, 0);
          nw.exp_s1    = m.score(pc, m.ghist, 1);
          if (x_valid && nbbp_model#(L, A, 4)::index(pc) == nbbp_model#(L, A, 4)::index(x_pc))
            n_same_entry++;
        end
        s++;
        if (s == NSLOT) begin s = 0; k++; end
      end
      in_d = nw;

      // The update the DUT performs at the coming edge.
      if (x_valid) begin
        m.update(x_pc, x_taken, x_hist);
        n_shift++;
      end
      @(negedge clk);
    end

    $display("mechanisms: taken=%0d not_taken=%0d tie=%0d uncond=%0d nonbranch=%0d bubble=%0d",
             n_taken, n_not_taken, n_tie, n_uncond, n_nonbranch, n_bubble);
    $display("mechanisms: sat_hi=%0d sat_lo=%0d same_entry=%0d shifts=%0d mispredicts=%0d",
             m.sat_hi_events, m.sat_lo_events, n_same_entry, n_shift, n_mispred);
    $display("trained misprediction rate (alternating and never-taken branches): %0d/%0d",
             late_miss, late_cond);
    foreach (slot_miss[i]) $display("slot %0d trained mispredictions %0d/%0d", i, slot_miss[i], slot_late[i]);
    check(n_taken > 0, "a taken prediction occurred");
    check(n_not_taken > 0, "a not-taken prediction occurred");
    check(n_tie > 0, "a score tie occurred");
    check(n_uncond > 0, "an unconditional redirect occurred");
    check(n_nonbranch > 0, "a non-branch occurred");
    check(n_bubble > 0, "a fetch bubble occurred");
    check(m.sat_hi_events > 0, "a counter saturated high");
    check(m.sat_lo_events > 0, "a counter saturated low");
    check(n_same_entry > 0, "predict and update of one entry in one cycle");
    check(n_shift > 0, "history shifted");
    check(n_mispred > 0, "a misprediction occurred");
    check(late_miss * 10 < late_cond, "trained accuracy above 90% on the alternating and never-taken branches");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
