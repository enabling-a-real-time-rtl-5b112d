// tb_result_bram: checks the dual-ported result memory.
//
// Writes random words to every address through port A, reads them back on
// port B with the one-cycle read latency, then writes and reads the same
// address in one cycle, which must return the old word. Data are compared
// with a testbench copy of the memory.
module tb_result_bram;
  localparam int DEPTH = 1024;
  localparam int AW = 10;

  logic clk = 0;
  always #5 clk = ~clk;

  logic          a_we, b_re;
  logic [AW-1:0] a_addr, b_addr;
  logic [31:0]   a_wdata, b_rdata;

  result_bram #(.DEPTH(DEPTH)) dut (.clk, .a_we, .a_addr, .a_wdata, .b_re, .b_addr, .b_rdata);

  int checks = 0, failures = 0;
  logic [31:0] model [DEPTH];

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] exp_v, input string what);
    checks++;
    if (b_rdata !== exp_v) begin
      failures++;
      if (failures < 10) $display("%s: got %h exp %h", what, b_rdata, exp_v);
    end
  endtask

  initial begin
    a_we = 0; b_re = 0; a_addr = '0; b_addr = '0; a_wdata = '0;
    @(posedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = $urandom();
      a_we <= 1; a_addr <= AW'(i); a_wdata <= model[i];
      @(posedge clk);
    end
    a_we <= 0;
    for (int i = 0; i < DEPTH; i++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      b_re <= 1; b_addr <= AW'(a);
      @(posedge clk);
      b_re <= 0;
      #1 check(model[a], "read");
    end
    // same-cycle write and read of one address: old data returned
    for (int i = 0; i < 50; i++) begin
      int a;
      logic [31:0] nv;
      a = $urandom_range(0, DEPTH - 1);
      nv = $urandom();
      a_we <= 1; a_addr <= AW'(a); a_wdata <= nv;
      b_re <= 1; b_addr <= AW'(a);
      @(posedge clk);
      a_we <= 0; b_re <= 0;
      #1 check(model[a], "read during write");
      model[a] = nv;
      b_re <= 1;
      @(posedge clk);
      b_re <= 0;
      #1 check(model[a], "read after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
