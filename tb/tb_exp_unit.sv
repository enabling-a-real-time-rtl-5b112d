// tb_exp_unit: checks exp_unit against real-valued exp().
//
// Feeds one argument per cycle (random values over the useful range plus
// the saturation and underflow edges), with the stimulus index as the tag.
// Each output must match e^x within 1e-4 relative + 2 LSB and arrive exactly
// 3 cycles after its input.
module tb_exp_unit;
  import em_pkg::*;
  import em_ref_pkg::*;

  localparam int NUM = 4000;
  localparam int LAT = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid;
  fix32_t      x;
  logic [15:0] in_tag, out_tag;
  logic        out_valid;
  ufix32_t     y;

  exp_unit #(.TW(16)) dut (.clk, .rst_n, .in_valid, .x, .in_tag, .out_valid, .y, .out_tag);

  int checks = 0, failures = 0;
  longint signed xs [NUM];
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
      xs[i] = longint'($urandom_range(0, 23 * 65536)) - 12 * 65536;
    end
    xs[0] = 0;
    xs[1] = 65536;           // e
    xs[2] = -65536;          // 1/e
    xs[3] = 11 * 65536;      // saturates
    xs[4] = -20 * 65536;     // underflows
    xs[5] = 32'sh7FFF_FFFF;
    xs[6] = -64'sh8000_0000;
    xs[7] = 10 * 65536;
    in_valid = 0; x = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < NUM; i++) begin
      in_valid <= 1; x <= fix32_t'(xs[i]); in_tag <= 16'(i);
      in_cycle[i] = cycle + 1;
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int seen = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    real e;
    e = ref_exp_real(xs[out_tag]);
    checks++;
    if (!close(real'(y), e, 1e-4, 2.0)) begin
      failures++;
      if (failures < 10) $display("exp mismatch x=%0d got=%0d exp=%f", xs[out_tag], y, e);
    end
    checks++;
    if (int'(out_tag) != seen || cycle - in_cycle[out_tag] != LAT) begin
      failures++;
      if (failures < 10) $display("order/latency error tag=%0d lat=%0d", out_tag, cycle - in_cycle[out_tag]);
    end
    seen++;
  end

  final begin end
endmodule
