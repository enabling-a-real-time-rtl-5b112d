// tb_pij_head: checks the subtract/divide/square head against integer math.
//
// Random 0.16 datapoints, means and variances (with zero and very small
// variances to exercise saturation) enter one per cycle. Every term must
// equal ((y-mu)/sigma)^2 in 16.16 exactly, and arrive 34 cycles later.
module tb_pij_head;
  import em_pkg::*;
  import em_ref_pkg::*;

  localparam int NUM = 3000;
  localparam int LAT = 34;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid, out_valid;
  frac16_t     y, mu, sigma;
  logic [15:0] in_tag, out_tag;
  ufix32_t     term;

  pij_head #(.TW(16)) dut (.clk, .rst_n, .in_valid, .y, .mu, .sigma, .in_tag,
                           .out_valid, .term, .out_tag);

  int checks = 0, failures = 0, sat_seen = 0;
  int unsigned ys [NUM], ms [NUM], ss [NUM];
  int in_cycle [NUM];
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
    for (int i = 0; i < NUM; i++) begin
      ys[i] = $urandom_range(0, 65535);
      ms[i] = $urandom_range(0, 65535);
      case ($urandom_range(0, 9))
        0:       ss[i] = 0;
        1:       ss[i] = $urandom_range(1, 64);
        default: ss[i] = $urandom_range(1000, 65535);
      endcase
    end
    in_valid = 0; y = '0; mu = '0; sigma = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < NUM; i++) begin
      in_valid <= 1; y <= 16'(ys[i]); mu <= 16'(ms[i]); sigma <= 16'(ss[i]);
      in_tag <= 16'(i);
      in_cycle[i] = cycle + 1;
      @(posedge clk);
      if ($urandom_range(0, 7) == 0) begin
        in_valid <= 0;
        @(posedge clk);
      end
    end
    in_valid <= 0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (sat_seen == 0) failures++;
    $display("saturated terms: %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seen = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    longint unsigned e;
    e = ref_term(ys[out_tag], ms[out_tag], ss[out_tag]);
    if (e == SAT) sat_seen++;
    checks++;
    if (64'(term) != e) begin
      failures++;
      if (failures < 10) $display("term mismatch y=%0d mu=%0d s=%0d got=%0d exp=%0d",
                                  ys[out_tag], ms[out_tag], ss[out_tag], term, e);
    end
    checks++;
    if (int'(out_tag) != seen || cycle - in_cycle[out_tag] != LAT) begin
      failures++;
      if (failures < 10) $display("order/latency error tag=%0d", out_tag);
    end
    seen++;
  end
endmodule
