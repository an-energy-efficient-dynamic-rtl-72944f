// tb_nbc_posterior_sum: checks the two-stage ones counter at its default size
// (31 inputs, 7-bit LUTs). Random and corner-case vectors are applied, one per
// cycle with random gaps; each result must appear exactly one cycle after its
// input, with valid_o high only then, and equal the number of ones.
module tb_nbc_posterior_sum;
  localparam int N = 31;
  logic clk = 1'b0, rst_n;
  logic valid_i, valid_o;
  logic [N-1:0] bits_i;
  logic [5:0] sum_o;
  int checks = 0, failures = 0;

  nbc_posterior_sum #(.N_BITS(N), .LUT_W(7)) dut (
    .clk(clk), .rst_n(rst_n), .valid_i(valid_i), .bits_i(bits_i),
    .valid_o(valid_o), .sum_o(sum_o)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ones(logic [N-1:0] v);
    int n = 0;
    for (int k = 0; k < N; k++) n += int'(v[k]);
    return n;
  endfunction

  initial begin
    logic [N-1:0] prev_bits;
    logic prev_valid;
    rst_n = 1'b0; valid_i = 1'b0; bits_i = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    prev_valid = 1'b0; prev_bits = '0;
    for (int c = 0; c < 2000; c++) begin
      // Outputs for the vector applied one cycle earlier.
      checks++;
      if (valid_o != prev_valid) begin
        failures++;
        $display("FAIL cycle %0d valid_o=%0d expected %0d", c, valid_o, prev_valid);
      end
      if (prev_valid) begin
        checks++;
        if (int'(sum_o) != ones(prev_bits)) begin
          failures++;
          $display("FAIL cycle %0d bits=%b sum=%0d expected %0d", c, prev_bits, sum_o, ones(prev_bits));
        end
      end
      valid_i = ($urandom % 4) != 0;
      case (c)
        0: bits_i = '0;
        1: bits_i = '1;
        2: bits_i = {1'b1, {(N-1){1'b0}}};
        3: bits_i = {(N-1){1'b1}} << 1;
        default: bits_i = N'($urandom) & N'($urandom | ((($urandom % 2) != 0) ? 32'h0 : 32'hFFFF_FFFF));
      endcase
      if (c < 4) valid_i = 1'b1;
      prev_valid = valid_i;
      prev_bits = bits_i;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
