// tb_pij_pipeline: end-to-end check of the two-lane p_ij datapath.
//
// Random 12-dimensional datapoints are streamed at the full rate of one
// two-coordinate word per cycle, against one cluster's random means and
// variances. For every datapoint the testbench computes S = sum_k
// ((y_k-mu_k)/sigma_k)^2 exactly and the expected pi * e^(varsum - S/2), and
// checks the result within 2e-4 relative + 3 LSB. It also checks the rates
// the design promises: one result every 6 cycles in steady state and a
// latency of 41 cycles from a datapoint's last word to its result.
module tb_pij_pipeline;
  import em_pkg::*;
  import em_ref_pkg::*;

  localparam int NPTS = 400;
  localparam int LAT  = 41;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      in_valid, out_valid;
  frac16_t   y [LANES], mu [LANES], sigma [LANES];
  pair_tag_t in_tag;
  fix32_t    varsum;
  frac16_t   mixture;
  ufix32_t   result;

  pij_pipeline dut (.clk, .rst_n, .in_valid, .y, .mu, .sigma, .in_tag, .varsum, .mixture,
                    .out_valid, .result);

  int checks = 0, failures = 0;
  int unsigned mus [DIMS], sgs [DIMS];
  real expq [$];
  int  due  [$];
  int cycle = 0, last_out = -1, intervals_ok = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_tag = '0;
    for (int l = 0; l < LANES; l++) begin y[l] = '0; mu[l] = '0; sigma[l] = '0; end
    for (int k = 0; k < DIMS; k++) begin
      mus[k] = $urandom_range(16000, 40000);
      sgs[k] = $urandom_range(3000, 20000);
    end
    varsum  = fix32_t'(3 * 65536);
    mixture = 16'd5461;   // about 1/12
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int p = 0; p < NPTS; p++) begin
      longint unsigned s;
      s = 0;
      for (int c = 0; c < PAIRS; c++) begin
        for (int l = 0; l < LANES; l++) begin
          int unsigned yy;
          int k;
          k = c * LANES + l;
          // points near the mean with occasional outliers
          yy = (p % 7 == 0) ? $urandom_range(0, 65535)
                            : mus[k] + $urandom_range(0, sgs[k]) - sgs[k] / 2;
          y[l]     <= 16'(yy);
          mu[l]    <= 16'(mus[k]);
          sigma[l] <= 16'(sgs[k]);
          s += ref_term(yy, mus[k], sgs[k]);
        end
        in_valid     <= 1;
        in_tag.first <= (c == 0);
        in_tag.last  <= (c == PAIRS - 1);
        if (c == PAIRS - 1) begin
          expq.push_back(ref_result(ref_sat(s) >> 1, longint'(varsum), mixture));
          due.push_back(cycle + 1 + LAT);
        end
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (LAT + 10) @(posedge clk);
    checks++;
    if (expq.size() != 0) failures++;
    checks++;
    if (intervals_ok != NPTS - 1) failures++;
    $display("steady-state intervals of %0d cycles: %0d", PAIRS, intervals_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (last_out >= 0 && cycle - last_out == PAIRS) intervals_ok++;
    last_out = cycle;
    if (expq.size() == 0) begin
      failures++;
    end else begin
      real e;
      int d;
      e = expq.pop_front();
      d = due.pop_front();
      if (!close(real'(result), e, 2e-4, 3.0) || d != cycle) begin
        failures++;
        if (failures < 10) $display("pipeline mismatch got=%0d exp=%f cycle=%0d due=%0d", result, e, cycle, d);
      end
    end
  end
endmodule
