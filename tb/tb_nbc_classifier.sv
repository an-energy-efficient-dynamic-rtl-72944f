// tb_nbc_classifier: checks the two-cycle naive Bayes classifier at its
// default size. Random counters, priors and histories are applied; the
// expected class scores are the number of selected counters (prior plus the
// one picked by each history bit) that are 8 or more, and the prediction is
// taken when the y=1 score is larger. Results must appear exactly one cycle
// after the inputs. Ties are forced now and then and must predict not taken.
module tb_nbc_classifier;
  localparam int L = 30, C = 4;
  typedef logic [L-1:0][1:0][1:0][C-1:0] row_t;
  logic clk = 1'b0, rst_n;
  logic valid_i, valid_o, taken_o;
  logic [L-1:0] hist;
  logic [1:0][C-1:0] prior;
  row_t row;
  logic [5:0] score0, score1;
  int checks = 0, failures = 0, n_tie = 0, n_taken = 0, n_not = 0;

  nbc_classifier #(.HIST_LEN(L), .CNT_BITS(C), .LUT_W(7)) dut (
    .clk(clk), .rst_n(rst_n), .valid_i(valid_i), .hist_i(hist), .prior_i(prior),
    .row_i(row), .valid_o(valid_o), .taken_o(taken_o), .score0_o(score0), .score1_o(score1)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic int score(int y);
    int s = (prior[y] >= 8) ? 1 : 0;
    for (int i = 0; i < L; i++) if (row[i][y][hist[i]] >= 8) s++;
    return s;
  endfunction

  initial begin
    int e0, e1;
    bit pv;
    rst_n = 1'b0; valid_i = 1'b0; hist = '0; prior = '0; row = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    pv = 1'b0; e0 = 0; e1 = 0;
    for (int c = 0; c < 3000; c++) begin
      check(valid_o == pv, $sformatf("valid latency cycle %0d", c));
      if (pv) begin
        check(int'(score0) == e0 && int'(score1) == e1,
              $sformatf("scores %0d/%0d expected %0d/%0d", score0, score1, e0, e1));
        check(taken_o == (e1 > e0), "prediction");
        if (e0 == e1) n_tie++;
        else if (e1 > e0) n_taken++;
        else n_not++;
      end
      valid_i = ($urandom % 4) != 0;
      hist = L'($urandom);
      prior = 8'($urandom);
      for (int i = 0; i < L; i++) row[i] = 16'($urandom);
      if (c % 7 == 0) begin
        // Make both classes see identical counters: a tie.
        prior[1] = prior[0];
        for (int i = 0; i < L; i++) row[i][1] = row[i][0];
      end
      pv = valid_i;
      e0 = score(0);
      e1 = score(1);
      @(negedge clk);
    end
    check(n_tie > 0 && n_taken > 0 && n_not > 0, "ties, taken and not-taken all occurred");
    $display("ties=%0d taken=%0d not_taken=%0d", n_tie, n_taken, n_not);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
