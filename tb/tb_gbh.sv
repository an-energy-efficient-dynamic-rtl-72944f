// tb_gbh: checks the global branch history register against a software
// queue of outcomes: after reset it is all zeros, it shifts a new outcome in
// at the newest end only when shift_i is high, and otherwise holds.
module tb_gbh;
  localparam int L = 30;
  logic clk = 1'b0, rst_n, shift_i, outcome_i;
  logic [L-1:0] hist_o;
  int checks = 0, failures = 0;

  gbh #(.HIST_LEN(L)) dut (.clk(clk), .rst_n(rst_n), .shift_i(shift_i),
                          .outcome_i(outcome_i), .hist_o(hist_o));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit outcomes[$];
    logic [L-1:0] exp;
    rst_n = 1'b0; shift_i = 1'b0; outcome_i = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < L; i++) outcomes.push_back(1'b0);
    for (int c = 0; c < 1000; c++) begin
      // Expected: x_1 (bit 0) is the oldest of the last L outcomes.
      for (int i = 0; i < L; i++) exp[i] = outcomes[outcomes.size() - L + i];
      checks++;
      if (hist_o != exp) begin
        failures++;
        $display("FAIL cycle %0d hist=%b expected %b", c, hist_o, exp);
      end
      shift_i = ($urandom % 3) != 0;
      outcome_i = 1'($urandom);
      if (shift_i) outcomes.push_back(outcome_i);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
