// cpt: conditional probability table, 2^ADDR_BITS entries selected by the
// hashed branch address. Each entry holds, for every history position i, the
// four saturating bimodal counters p(x_i = x, y = c).
//
// Entry layout: row[i][c][x] (packed [HIST_LEN-1:0][1:0][1:0][CNT_BITS-1:0]),
// HIST_LEN*4*CNT_BITS bits per entry: 480 bits and 122,880 bits in all at
// the default sizes.
// Port "rd" is the prediction read (combinational). Port "upd" is the
// training read-modify-write: upd_rdata_o is the entry at upd_idx_i, and
// upd_wdata_i is written there at the rising edge when upd_we_i is high.
// A same-cycle read of an entry being written returns the old value.
// At reset (synchronous, active low) p(x_i=0,y) = 0111... and
// p(x_i=1,y) = 1000..., so each pair sums to all ones as
// P(x_i=0|y) = 1 - P(x_i=1|y) requires, and both classes start with equal
// likelihoods; this starting point is this design's choice. The table is a
// register array; a compiled SRAM could replace it.
module cpt #(
  parameter int unsigned HIST_LEN  = 30,
  parameter int unsigned ADDR_BITS = 8,
  parameter int unsigned CNT_BITS  = 4
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  logic [ADDR_BITS-1:0]                      rd_idx_i,
  output logic [HIST_LEN-1:0][1:0][1:0][CNT_BITS-1:0] rd_row_o,
  input  logic [ADDR_BITS-1:0]                      upd_idx_i,
  output logic [HIST_LEN-1:0][1:0][1:0][CNT_BITS-1:0] upd_rrow_o,
  input  logic                                      upd_we_i,
  input  logic [HIST_LEN-1:0][1:0][1:0][CNT_BITS-1:0] upd_wrow_i
);

  localparam int unsigned DEPTH = 2 ** ADDR_BITS;
  localparam logic [CNT_BITS-1:0] HALF = CNT_BITS'(1) << (CNT_BITS - 1);

  typedef logic [HIST_LEN-1:0][1:0][1:0][CNT_BITS-1:0] row_t;

  function automatic row_t reset_row();
    row_t r;
    for (int unsigned i = 0; i < HIST_LEN; i++)
      for (int unsigned c = 0; c < 2; c++) begin
        r[i][c][0] = HALF - 1'b1;
        r[i][c][1] = HALF;
      end
    return r;
  endfunction

  row_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned e = 0; e < DEPTH; e++) mem[e] <= reset_row();
    end else if (upd_we_i) begin
      mem[upd_idx_i] <= upd_wrow_i;
    end
  end

  assign rd_row_o   = mem[rd_idx_i];
  assign upd_rrow_o = mem[upd_idx_i];

endmodule
