// tb_nbc_popcount_lut: exhaustive test of the popcount look-up table at the
// 7-bit group width of the adder tree and at the 3-bit width of its last
// group; every input is compared with a bit-by-bit count.
module tb_nbc_popcount_lut;
  logic [6:0] in7;
  logic [2:0] out7;
  logic [2:0] in3;
  logic [1:0] out3;
  int checks = 0, failures = 0;

  nbc_popcount_lut #(.W(7)) dut7 (.in(in7), .count(out7));
  nbc_popcount_lut #(.W(3)) dut3 (.in(in3), .count(out3));

  function automatic int ones(int v, int w);
    int n = 0;
    for (int k = 0; k < w; k++) n += (v >> k) & 1;
    return n;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      in7 = 7'(v);
      in3 = 3'(v);
      #1;
      checks++;
      if (int'(out7) != ones(v, 7)) begin
        failures++;
        $display("FAIL W=7 in=%b out=%0d", in7, out7);
      end
      if (v < 8) begin
        checks++;
        if (int'(out3) != ones(v, 3)) begin
          failures++;
          $display("FAIL W=3 in=%b out=%0d", in3, out3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
