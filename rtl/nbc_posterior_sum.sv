// nbc_posterior_sum: two-stage ones counter that turns the selected counter
// MSBs of one class (y = 0 or y = 1) into that class's log-posterior score.
//
// Stage 1 (cycle of the request): the N_BITS input bits are cut into groups
// of LUT_W bits counted by nbc_popcount_lut, and the LUT results are added in
// pairs. The pair sums, plus the count of an unpaired last group, are stored
// in pipeline registers. Stage 2 (next cycle): the pair sums are added and
// then the unpaired group count, combinationally, giving the score.
// With the default N_BITS = 31 (30 history MSBs plus the prior MSB) this is
// four 7-bit LUTs and one 3-bit LUT, two 4-bit-result adders before the
// registers, then a 5-bit and a 6-bit result adder after them.
//
// Any N_BITS >= 1 works; with a single group (N_BITS <= LUT_W) the only
// LUT result is the unpaired one and the pair register stays zero.
//
// Interface: valid_i/bits_i are sampled at a rising edge; valid_o/sum_o
// are valid during the following cycle (one register, two cycles of logic).
// Reset is synchronous and active low and clears only valid_o.
// The output width, $clog2(N_BITS+1)+1, reproduces the 6-bit result of the
// default tree; the exact sum never needs the top bit.
module nbc_posterior_sum #(
  parameter int unsigned N_BITS = 31,
  parameter int unsigned LUT_W  = 7,
  localparam int unsigned SUM_W = $clog2(N_BITS + 1) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              valid_i,
  input  logic [N_BITS-1:0] bits_i,
  output logic              valid_o,
  output logic [SUM_W-1:0]  sum_o
);

  localparam int unsigned NG     = (N_BITS + LUT_W - 1) / LUT_W;  // LUT groups
  localparam int unsigned LAST_W = N_BITS - (NG - 1) * LUT_W;     // last group width
  localparam int unsigned NP     = NG / 2;                        // adder pairs
  localparam int unsigned NPA    = (NP > 0) ? NP : 1;             // pair registers kept
  localparam bit          ODD    = (NG % 2) == 1;
  localparam int unsigned CW     = $clog2(LUT_W + 1);             // LUT result width

  logic [NG-1:0][CW-1:0] grp_cnt;

  for (genvar g = 0; g < NG; g++) begin : g_lut
    if (g == NG - 1) begin : g_last
      logic [$clog2(LAST_W+1)-1:0] c;
      nbc_popcount_lut #(.W(LAST_W)) u_lut (
        .in    (bits_i[g*LUT_W +: LAST_W]),
        .count (c)
      );
      assign grp_cnt[g] = CW'(c);
    end else begin : g_full
      nbc_popcount_lut #(.W(LUT_W)) u_lut (
        .in    (bits_i[g*LUT_W +: LUT_W]),
        .count (grp_cnt[g])
      );
    end
  end

  // Stage 1: first level of adders, then pipeline registers.
  logic [NPA-1:0][CW:0] pair_d, pair_q;
  logic [CW-1:0]       odd_d, odd_q;

  if (NP == 0) begin : g_no_pair
    assign pair_d = '0;
  end
  for (genvar p = 0; p < NP; p++) begin : g_pair
    assign pair_d[p] = {1'b0, grp_cnt[2*p]} + {1'b0, grp_cnt[2*p+1]};
  end
  assign odd_d = ODD ? grp_cnt[NG-1] : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) valid_o <= 1'b0;
    else        valid_o <= valid_i;
    pair_q <= pair_d;
    odd_q  <= odd_d;
  end

  // Stage 2: remaining adders.
  logic [NPA:0][SUM_W-1:0] acc;
  assign acc[0] = '0;
  for (genvar p = 0; p < NPA; p++) begin : g_acc
    assign acc[p+1] = acc[p] + SUM_W'(pair_q[p]);
  end
  assign sum_o = acc[NPA] + SUM_W'(odd_q);

endmodule
