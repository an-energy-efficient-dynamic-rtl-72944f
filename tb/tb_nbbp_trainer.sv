// tb_nbbp_trainer: checks the training rule on random counter values (biased
// towards 0 and 15 so that saturation happens often). For outcome t the
// expected result is computed counter by counter with integers: p(y=t) + 1,
// p(y=!t) - 1, p(x_i=h_i, y=t) + 1, p(x_i=!h_i, y=t) - 1, all clamped to
// [0, 15], and the y=!t row unchanged.
module tb_nbbp_trainer;
  localparam int L = 30, C = 4;
  typedef logic [L-1:0][1:0][1:0][C-1:0] row_t;
  logic outcome;
  logic [L-1:0] hist;
  logic [1:0][C-1:0] prior_i, prior_o;
  row_t row_i, row_o;
  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0;

  nbbp_trainer #(.HIST_LEN(L), .CNT_BITS(C)) dut (
    .outcome_i(outcome), .hist_i(hist), .prior_i(prior_i), .row_i(row_i),
    .prior_o(prior_o), .row_o(row_o)
  );

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rand_cnt();
    case ($urandom % 4)
      0: return 0;
      1: return 15;
      default: return int'($urandom % 16);
    endcase
  endfunction

  function automatic int clamp(int v);
    if (v < 0) return 0;
    if (v > 15) return 15;
    return v;
  endfunction

  initial begin
    int exp;
    for (int n = 0; n < 2000; n++) begin
      outcome = 1'($urandom);
      hist = L'($urandom);
      for (int y = 0; y < 2; y++) prior_i[y] = 4'(rand_cnt());
      for (int i = 0; i < L; i++)
        for (int y = 0; y < 2; y++)
          for (int x = 0; x < 2; x++) row_i[i][y][x] = 4'(rand_cnt());
      #1;
      for (int y = 0; y < 2; y++) begin
        exp = clamp(int'(prior_i[y]) + ((y == int'(outcome)) ? 1 : -1));
        checks++;
        if (int'(prior_o[y]) != exp) begin
          failures++;
          $display("FAIL prior y=%0d t=%0d in=%0d out=%0d exp=%0d", y, outcome, prior_i[y], prior_o[y], exp);
        end
      end
      if (prior_i[outcome] == 4'd15) n_sat_hi++;
      if (prior_i[!outcome] == 4'd0) n_sat_lo++;
      for (int i = 0; i < L; i++)
        for (int y = 0; y < 2; y++)
          for (int x = 0; x < 2; x++) begin
            if (y != int'(outcome)) exp = int'(row_i[i][y][x]);
            else if (x == int'(hist[i])) exp = clamp(int'(row_i[i][y][x]) + 1);
            else exp = clamp(int'(row_i[i][y][x]) - 1);
            checks++;
            if (int'(row_o[i][y][x]) != exp) begin
              failures++;
              if (failures < 20)
                $display("FAIL cpt i=%0d y=%0d x=%0d t=%0d h=%0d in=%0d out=%0d exp=%0d",
                         i, y, x, outcome, hist[i], row_i[i][y][x], row_o[i][y][x], exp);
            end
          end
    end
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++;
      $display("FAIL saturation not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
