// tb_pij_tail: checks varsum subtraction, exponential and mixture product.
//
// Random halved sums, varsum constants and mixture proportions enter one per
// cycle. Each result must equal pi * e^(varsum - S/2) within 2e-4 relative
// + 3 LSB, and arrive 5 cycles after its input.
module tb_pij_tail;
  import em_pkg::*;
  import em_ref_pkg::*;

  localparam int NUM = 3000;
  localparam int LAT = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    in_valid, out_valid;
  ufix32_t half_sum;
  fix32_t  varsum;
  frac16_t mixture;
  ufix32_t result;

  pij_tail dut (.clk, .rst_n, .in_valid, .half_sum, .varsum, .mixture, .out_valid, .result);

  int checks = 0, failures = 0;
  real             expq [$];
  int              due  [$];
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; half_sum = '0; varsum = '0; mixture = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < NUM; i++) begin
      int unsigned h, m;
      int signed v;
      h = (i % 50 == 0) ? $urandom_range(32'h0100_0000, 32'h3FFF_FFFF) : $urandom_range(0, 20 * 65536);
      v = int'($urandom_range(0, 30 * 65536)) - 15 * 65536;
      m = $urandom_range(1, 65535);
      in_valid <= 1; half_sum <= h; varsum <= v; mixture <= 16'(m);
      expq.push_back(ref_result(h, v, m));
      due.push_back(cycle + 1 + LAT);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (expq.size() == 0) begin
      failures++;
    end else begin
      real e;
      int d;
      e = expq.pop_front();
      d = due.pop_front();
      if (!close(real'(result), e, 2e-4, 3.0) || d != cycle) begin
        failures++;
        if (failures < 10) $display("tail mismatch got=%0d exp=%f", result, e);
      end
    end
  end
endmodule
