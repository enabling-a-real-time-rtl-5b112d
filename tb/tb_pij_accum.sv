// tb_pij_accum: checks the two-input adder, accumulator and halving shift.
//
// Random datapoints of six two-term words are streamed with first/last tags,
// with and without idle cycles between words. Each result must equal half the
// saturated sum of its twelve terms, appear 2 cycles after its last word, and
// results must not appear at any other time. Some datapoints use huge terms to
// force saturation.
module tb_pij_accum;
  import em_pkg::*;
  import em_ref_pkg::*;

  localparam int NPTS = 500;
  localparam int LAT  = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      in_valid, out_valid;
  ufix32_t   term [LANES];
  pair_tag_t in_tag;
  ufix32_t   half_sum;

  pij_accum dut (.clk, .rst_n, .in_valid, .term, .in_tag, .out_valid, .half_sum);

  int checks = 0, failures = 0, sat_seen = 0;
  longint unsigned expq [$];
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
    in_valid = 0; in_tag = '0;
    for (int l = 0; l < LANES; l++) term[l] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int p = 0; p < NPTS; p++) begin
      longint unsigned s;
      bit big;
      s = 0;
      big = ($urandom_range(0, 9) == 0);
      for (int c = 0; c < PAIRS; c++) begin
        for (int l = 0; l < LANES; l++) begin
          int unsigned t;
          t = big ? $urandom_range(32'h2000_0000, 32'h7FFF_FFFF) : $urandom_range(0, 32'h00FF_FFFF);
          term[l] <= t;
          s += t;
        end
        in_valid <= 1;
        in_tag.first <= (c == 0);
        in_tag.last  <= (c == PAIRS - 1);
        if (c == PAIRS - 1) begin
          expq.push_back(ref_sat(s) >> 1);
          due.push_back(cycle + 1 + LAT);
          if (ref_sat(s) == SAT) sat_seen++;
        end
        @(posedge clk);
        if ($urandom_range(0, 3) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
      end
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (expq.size() != 0 || sat_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (expq.size() == 0) begin
      failures++;
      $display("unexpected result");
    end else begin
      longint unsigned e;
      int d;
      e = expq.pop_front();
      d = due.pop_front();
      if (64'(half_sum) != e || d != cycle) begin
        failures++;
        if (failures < 10) $display("accum mismatch got=%0d exp=%0d cycle=%0d due=%0d", half_sum, e, cycle, d);
      end
    end
  end
endmodule
