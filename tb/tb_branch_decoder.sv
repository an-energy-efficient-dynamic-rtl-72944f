// tb_branch_decoder: checks the stage-F branch decoder for every opcode with
// random register fields, immediates and addresses. Conditional branches are
// opcodes 0x11-0x15 and 0x17 with destination pc + 4*sext(imm16);
// unconditional bi (0x38) and calli (0x3E) use pc + 4*sext(imm26); all other
// opcodes, including the register-indirect b and call, are non-branches.
module tb_branch_decoder;
  logic [31:0] pc, instr, target;
  logic is_cond, is_uncond;
  int checks = 0, failures = 0;

  branch_decoder dut (.pc_i(pc), .instr_i(instr), .is_cond_o(is_cond),
                      .is_uncond_o(is_uncond), .target_o(target));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ec, eu;
    int unsigned off;
    int op;
    int n_cond, n_uncond;
    n_cond = 0;
    n_uncond = 0;
    for (int n = 0; n < 64 * 50; n++) begin
      op = n % 64;
      pc = $urandom & ~32'h3;
      instr = {6'(op), 26'($urandom)};
      #1;
      ec = (op >= 'h11 && op <= 'h15) || op == 'h17;
      eu = op == 'h38 || op == 'h3E;
      checks++;
      if (is_cond != ec || is_uncond != eu) begin
        failures++;
        $display("FAIL op=%h cond=%0d uncond=%0d", op, is_cond, is_uncond);
      end
      if (ec) n_cond++;
      if (eu) n_uncond++;
      if (ec) begin
        off = instr[15] ? (32'(instr[15:0]) - 32'h10000) * 4 : 32'(instr[15:0]) * 4;
        checks++;
        if (target != pc + off) begin
          failures++;
          $display("FAIL cond target %h expected %h", target, pc + off);
        end
      end
      if (eu) begin
        off = instr[25] ? (32'(instr[25:0]) - 32'h400_0000) * 4 : 32'(instr[25:0]) * 4;
        checks++;
        if (target != pc + off) begin
          failures++;
          $display("FAIL uncond target %h expected %h", target, pc + off);
        end
      end
    end
    checks++;
    if (n_cond != 6 * 50 || n_uncond != 2 * 50) begin
      failures++;
      $display("FAIL opcode sweep incomplete");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
