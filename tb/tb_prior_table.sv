// tb_prior_table: checks the P(y) table. After reset every entry must hold
// p(y=0) = 7, p(y=1) = 8. Then random writes are made and both read ports
// are compared with a shadow array; a read of the entry being written in the
// same cycle must return the old value.
module tb_prior_table;
  localparam int A = 8, C = 4, DEPTH = 1 << A;
  logic clk = 1'b0, rst_n;
  logic [A-1:0] rd_idx, upd_idx;
  logic [1:0][C-1:0] rd_data, upd_rdata, upd_wdata;
  logic upd_we;
  int checks = 0, failures = 0;
  logic [1:0][C-1:0] shadow [DEPTH];

  prior_table #(.ADDR_BITS(A), .CNT_BITS(C)) dut (
    .clk(clk), .rst_n(rst_n), .rd_idx_i(rd_idx), .rd_data_o(rd_data),
    .upd_idx_i(upd_idx), .upd_rdata_o(upd_rdata), .upd_we_i(upd_we), .upd_wdata_i(upd_wdata)
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

  initial begin
    rst_n = 1'b0; upd_we = 1'b0; rd_idx = '0; upd_idx = '0; upd_wdata = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int e = 0; e < DEPTH; e++) begin
      rd_idx = A'(e);
      upd_idx = A'(DEPTH - 1 - e);
      #1;
      check(rd_data[0] == 4'd7 && rd_data[1] == 4'd8, $sformatf("reset value entry %0d", e));
      check(upd_rdata == rd_data, "both ports read the same reset value");
      shadow[e][0] = 4'd7;
      shadow[e][1] = 4'd8;
    end
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      upd_we    = 1'($urandom);
      upd_idx   = A'($urandom % 16);
      upd_wdata = 8'($urandom);
      rd_idx    = (c % 5 == 0) ? upd_idx : A'($urandom % 16);
      #1;
      check(rd_data == shadow[rd_idx], $sformatf("rd entry %0d", rd_idx));
      check(upd_rdata == shadow[upd_idx], $sformatf("upd read entry %0d", upd_idx));
      @(posedge clk);
      if (upd_we) shadow[upd_idx] = upd_wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
