// branch_decoder: fetch-stage branch decoder for LatticeMico32 instructions.
//
// Placed in stage F next to the predictor, so that a conditional branch is
// recognised, and its destination computed, in the same cycle the predictor
// starts reading its tables. It recognises the PC-relative branches of the
// LatticeMico32 instruction set:
//   conditional   be, bg, bge, bgeu, bgu, bne: target = pc + sext(imm16) * 4
//   unconditional bi, calli:                   target = pc + sext(imm26) * 4
// Register-indirect jumps and calls (b, call) and all other instructions are
// reported as non-branches, since their destination is not in the word.
// The opcode values and immediate formats are those of the LatticeMico32
// instruction set.
//
// Interface: purely combinational.
module branch_decoder
  import nbbp_pkg::*;
(
  input  logic [31:0] pc_i,
  input  logic [31:0] instr_i,
  output logic        is_cond_o,
  output logic        is_uncond_o,
  output logic [31:0] target_o
);

  logic [5:0]  opcode;
  logic [31:0] off16, off26;

  assign opcode = instr_i[31:26];
  assign off16  = {{14{instr_i[15]}}, instr_i[15:0], 2'b00};
  assign off26  = {{4{instr_i[25]}},  instr_i[25:0], 2'b00};

  always_comb begin
    is_cond_o   = 1'b0;
    is_uncond_o = 1'b0;
    target_o    = pc_i + off16;
    unique case (opcode)
      OP_BE, OP_BG, OP_BGE, OP_BGEU, OP_BGU, OP_BNE: is_cond_o = 1'b1;
      OP_BI, OP_CALLI: begin
        is_uncond_o = 1'b1;
        target_o    = pc_i + off26;
      end
      default: ;
    endcase
  end

endmodule
