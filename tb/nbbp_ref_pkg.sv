// nbbp_ref_pkg: behavioural reference model of the naive Bayes branch
// predictor, used by the testbenches to work out the expected predictions
// independently of the RTL.
//
// The model keeps every counter as an int and applies the rules directly:
// a score is the number of counters (prior plus the one chosen by each
// history bit) whose value is at least half of the counter range; the
// prediction is taken when the y=1 score is larger; training increments the
// counters of the outcome's class that match the history (and p(y=t)) and
// decrements their partners, saturating at 0 and 2^C-1. It also counts how
// often a counter saturated, for the testbenches' coverage reports.
package nbbp_ref_pkg;

  class nbbp_model #(int L = 30, int A = 8, int C = 4);
    localparam int DEPTH = 1 << A;
    localparam int MAXV  = (1 << C) - 1;
    localparam int HALF  = 1 << (C - 1);

    int          prior [DEPTH][2];
    int          cptc  [DEPTH][L][2][2];  // [entry][i][y][x]
    bit [L-1:0]  ghist;
    int          sat_hi_events;
    int          sat_lo_events;

    function new();
      reset();
    endfunction

    function void reset();
      for (int e = 0; e < DEPTH; e++) begin
        prior[e][0] = HALF - 1;
        prior[e][1] = HALF;
        for (int i = 0; i < L; i++)
          for (int y = 0; y < 2; y++) begin
            cptc[e][i][y][0] = HALF - 1;
            cptc[e][i][y][1] = HALF;
          end
      end
      ghist = '0;
      sat_hi_events = 0;
      sat_lo_events = 0;
    endfunction

    static function int index(bit [31:0] pc);
      return int'((pc >> 2) % DEPTH);
    endfunction

    function int score(bit [31:0] pc, bit [L-1:0] h, int y);
      int e, s;
      e = index(pc);
      s = (prior[e][y] >= HALF) ? 1 : 0;
      for (int i = 0; i < L; i++)
        if (cptc[e][i][y][h[i]] >= HALF) s++;
      return s;
    endfunction

    function bit predict(bit [31:0] pc, bit [L-1:0] h);
      return score(pc, h, 1) > score(pc, h, 0);
    endfunction

    function int up(int v);
      if (v == MAXV) begin sat_hi_events++; return v; end
      return v + 1;
    endfunction

    function int down(int v);
      if (v == 0) begin sat_lo_events++; return v; end
      return v - 1;
    endfunction

    function void update(bit [31:0] pc, bit t, bit [L-1:0] h);
      int e;
      e = index(pc);
      prior[e][t]  = up(prior[e][t]);
      prior[e][!t] = down(prior[e][!t]);
      for (int i = 0; i < L; i++) begin
        cptc[e][i][t][h[i]]  = up(cptc[e][i][t][h[i]]);
        cptc[e][i][t][!h[i]] = down(cptc[e][i][t][!h[i]]);
      end
      ghist = {t, ghist[L-1:1]};
    endfunction
  endclass

endpackage
