// prior_table: the P(y) table, 2^ADDR_BITS entries of two saturating bimodal
// counters, p(y=0) and p(y=1), selected by the hashed branch address.
//
// Port "rd" is the prediction read: combinational, the entry at rd_idx_i.
// Port "upd" is the training read-modify-write: upd_rdata_o shows the entry at
// upd_idx_i combinationally, and when upd_we_i is high upd_wdata_i is written
// there at the rising edge. A read in the same cycle as a write to the same
// entry returns the old value.
// The entry layout is cnt[y] (packed [1:0][CNT_BITS-1:0]). At reset (synchronous,
// active low) every entry is set to p(y=0) = 0111..., p(y=1) = 1000..., the
// two values nearest the middle; the pair then always sums to all ones, as the
// counters represent P(y=0) = 1 - P(y=1). This reset value is this design's
// choice. The table is a register array; a compiled SRAM could replace it.
module prior_table #(
  parameter int unsigned ADDR_BITS = 8,
  parameter int unsigned CNT_BITS  = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [ADDR_BITS-1:0]          rd_idx_i,
  output logic [1:0][CNT_BITS-1:0]      rd_data_o,
  input  logic [ADDR_BITS-1:0]          upd_idx_i,
  output logic [1:0][CNT_BITS-1:0]      upd_rdata_o,
  input  logic                          upd_we_i,
  input  logic [1:0][CNT_BITS-1:0]      upd_wdata_i
);

  localparam int unsigned DEPTH = 2 ** ADDR_BITS;
  localparam logic [CNT_BITS-1:0] HALF = CNT_BITS'(1) << (CNT_BITS - 1);

  logic [1:0][CNT_BITS-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned e = 0; e < DEPTH; e++) begin
        mem[e][0] <= HALF - 1'b1;
        mem[e][1] <= HALF;
      end
    end else if (upd_we_i) begin
      mem[upd_idx_i] <= upd_wdata_i;
    end
  end

  assign rd_data_o   = mem[rd_idx_i];
  assign upd_rdata_o = mem[upd_idx_i];

endmodule
