// nbbp_pkg: constants and the opcode type shared by the naive Bayes branch
// predictor (NBBP) modules.
//
// The default sizes are those of the main configuration: a 30-bit global
// branch history, 8 address bits selecting one of 256 table entries, and
// 4-bit saturating bimodal counters. The 7-bit grouping of the popcount
// look-up tables follows the posterior adder tree. The LatticeMico32 opcode
// values used by the branch decoder come from that processor's instruction
// set, not from the predictor design itself.
package nbbp_pkg;

  localparam int unsigned HIST_LEN_DEFAULT  = 30;  // l, history length
  localparam int unsigned ADDR_BITS_DEFAULT = 8;   // n, address bits -> 2^n entries
  localparam int unsigned CNT_BITS_DEFAULT  = 4;   // bimodal counter width
  localparam int unsigned LUT_W_DEFAULT     = 7;   // bits counted by one LUT
  localparam int unsigned PC_LSB            = 2;   // instructions are 32-bit words

  // LatticeMico32 opcodes (instruction bits [31:26]) of the PC-relative branches.
  typedef enum logic [5:0] {
    OP_BE    = 6'h11,
    OP_BG    = 6'h12,
    OP_BGE   = 6'h13,
    OP_BGEU  = 6'h14,
    OP_BGU   = 6'h15,
    OP_BNE   = 6'h17,
    OP_BI    = 6'h38,
    OP_CALLI = 6'h3E
  } lm32_branch_op_e;

endpackage
