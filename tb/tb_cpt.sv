// tb_cpt: checks the conditional probability table at its default size
// (256 entries of 30 x 4 four-bit counters). After reset every counter
// p(x_i=0,y) must be 7 and every p(x_i=1,y) 8. Then random rows are written
// and both read ports compared with a shadow array, including reads of the
// entry being written in the same cycle (old value expected).
module tb_cpt;
  localparam int L = 30, A = 8, C = 4, DEPTH = 1 << A;
  typedef logic [L-1:0][1:0][1:0][C-1:0] row_t;
  logic clk = 1'b0, rst_n;
  logic [A-1:0] rd_idx, upd_idx;
  row_t rd_row, upd_rrow, upd_wrow;
  logic upd_we;
  int checks = 0, failures = 0;
  row_t shadow [DEPTH];

  cpt #(.HIST_LEN(L), .ADDR_BITS(A), .CNT_BITS(C)) dut (
    .clk(clk), .rst_n(rst_n), .rd_idx_i(rd_idx), .rd_row_o(rd_row),
    .upd_idx_i(upd_idx), .upd_rrow_o(upd_rrow), .upd_we_i(upd_we), .upd_wrow_i(upd_wrow)
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
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic row_t rand_row();
    row_t r;
    for (int i = 0; i < L; i++) r[i] = 16'($urandom);
    return r;
  endfunction

  initial begin
    bit ok;
    rst_n = 1'b0; upd_we = 1'b0; rd_idx = '0; upd_idx = '0; upd_wrow = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int e = 0; e < DEPTH; e++) begin
      rd_idx = A'(e);
      upd_idx = A'(e);
      #1;
      ok = 1'b1;
      for (int i = 0; i < L; i++)
        for (int y = 0; y < 2; y++)
          if (rd_row[i][y][0] != 4'd7 || rd_row[i][y][1] != 4'd8) ok = 1'b0;
      check(ok, $sformatf("reset row %0d", e));
      check(upd_rrow == rd_row, "both ports read the same reset row");
      shadow[e] = rd_row;
    end
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      upd_we   = 1'($urandom);
      upd_idx  = A'($urandom % 16);
      upd_wrow = rand_row();
      rd_idx   = (c % 4 == 0) ? upd_idx : A'($urandom % 16);
      #1;
      check(rd_row == shadow[rd_idx], $sformatf("rd row %0d", rd_idx));
      check(upd_rrow == shadow[upd_idx], $sformatf("upd read row %0d", upd_idx));
      @(posedge clk);
      if (upd_we) shadow[upd_idx] = upd_wrow;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
