// tb_nbbp_configs: runs the NBBP at the end points of the three parameter
// sweeps of the design-space study (history length 3 and 50 bits, address
// range 1 and 10 bits, counter size 2 and 10 bits) next to the main
// configuration (30, 8, 4), on the same periodic branch stream, and checks
// each one against the behavioural model. The misprediction rate of each is
// printed; only agreement with the model is checked.
module tb_nbbp_configs;
  logic clk = 1'b0, rst_n;
  always #5 clk = ~clk;

  localparam int NC = 7;
  logic done [NC];
  int   chk [NC], fail [NC], miss [NC], preds [NC];
  int checks = 0, failures = 0;

  nbbp_cfg_run #(.L(30), .A(8),  .C(4))  r0 (clk, rst_n, done[0], chk[0], fail[0], miss[0], preds[0]);
  nbbp_cfg_run #(.L(3),  .A(8),  .C(4))  r1 (clk, rst_n, done[1], chk[1], fail[1], miss[1], preds[1]);
  nbbp_cfg_run #(.L(50), .A(8),  .C(4))  r2 (clk, rst_n, done[2], chk[2], fail[2], miss[2], preds[2]);
  nbbp_cfg_run #(.L(30), .A(1),  .C(4))  r3 (clk, rst_n, done[3], chk[3], fail[3], miss[3], preds[3]);
  nbbp_cfg_run #(.L(30), .A(10), .C(4))  r4 (clk, rst_n, done[4], chk[4], fail[4], miss[4], preds[4]);
  nbbp_cfg_run #(.L(30), .A(8),  .C(2))  r5 (clk, rst_n, done[5], chk[5], fail[5], miss[5], preds[5]);
  nbbp_cfg_run #(.L(30), .A(8),  .C(10)) r6 (clk, rst_n, done[6], chk[6], fail[6], miss[6], preds[6]);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string names [NC] = '{"l=30 n=8 m=4", "l=3 n=8 m=4", "l=50 n=8 m=4", "l=30 n=1 m=4",
                          "l=30 n=10 m=4", "l=30 n=8 m=2", "l=30 n=8 m=10"};

  initial begin
    bit all_done;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int i = 0; i < NC; i++) if (!done[i]) all_done = 1'b0;
    end while (!all_done);
    for (int i = 0; i < NC; i++) begin
      $display("config %s: model mismatches %0d of %0d checks, mispredictions %0d/%0d",
               names[i], fail[i], chk[i], miss[i], preds[i]);
      checks += chk[i];
      failures += fail[i];
      checks++;
      if (preds[i] == 0) begin
        failures++;
        $display("FAIL config %s made no predictions", names[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
