// tb_mem_ctrl: checks the SRAM-to-pipeline memory controller.
//
// A behavioural SRAM is loaded with random words. For several runs (different
// base addresses and point counts, including zero points) the testbench
// checks that the controller presents every word of every datapoint in order,
// one per cycle, with the right pair index and first/last marks; a stand-in
// pipeline returns one result 41 cycles after each datapoint's last word,
// and the controller must write these to consecutive BlockRAM addresses and
// then raise done. A second start while busy must be ignored.
module tb_mem_ctrl;
  import em_pkg::*;

  localparam int AW = 12;
  localparam int LAT = 2;
  localparam int PIPE_LAT = 41;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           start, busy, done;
  logic [15:0]    npoints;
  logic [AW-1:0]  base;
  logic           sram_re;
  logic [AW-1:0]  sram_raddr, h_addr, s_addr;
  logic [31:0]    sram_rdata, h_wdata;
  logic           h_we;
  logic           pipe_valid;
  frac16_t        pipe_y [LANES];
  logic [2:0]     pipe_pair;
  pair_tag_t      pipe_tag;
  logic           res_valid;
  ufix32_t        res_data;
  logic           bram_we;
  logic [9:0]     bram_addr;
  ufix32_t        bram_wdata;

  mem_ctrl #(.SRAM_AW(AW), .SRAM_LAT(LAT), .RAW(10), .NW(16)) dut (
    .clk, .rst_n, .start, .npoints, .base, .busy, .done, .sram_re, .sram_raddr, .sram_rdata,
    .pipe_valid, .pipe_y, .pipe_pair, .pipe_tag, .res_valid, .res_data, .bram_we, .bram_addr,
    .bram_wdata);

  assign s_addr = busy ? sram_raddr : h_addr;
  sram_model #(.AW(AW), .LAT(LAT)) u_sram (.clk, .addr(s_addr), .we(h_we), .re(sram_re),
                                           .wdata(h_wdata), .rdata(sram_rdata));

  int checks = 0, failures = 0;
  logic [31:0] image [1 << AW];
  int exp_word, exp_res, run_base, run_n;
  int res_due [$];
  logic [31:0] res_val [$];
  int cycle = 0, reads = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (sram_re) reads <= reads + 1;
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("%0d: %s", cycle, msg);
  endtask

  // stand-in pipeline: a result PIPE_LAT cycles after each datapoint's last word
  always @(posedge clk) begin
    res_valid <= 0;
    if (res_due.size() != 0 && res_due[0] == cycle + 1) begin
      void'(res_due.pop_front());
      res_valid <= 1;
      res_data  <= res_val.pop_front();
    end
  end

  // word stream check
  always @(posedge clk) if (rst_n && pipe_valid) begin
    int p, c;
    logic [31:0] w;
    p = exp_word / PAIRS;
    c = exp_word % PAIRS;
    w = image[(run_base + exp_word) % (1 << AW)];
    checks++;
    if ({pipe_y[1], pipe_y[0]} != w || int'(pipe_pair) != c ||
        pipe_tag.first != (c == 0) || pipe_tag.last != (c == PAIRS - 1))
      fail($sformatf("word %0d: got %h pair %0d", exp_word, {pipe_y[1], pipe_y[0]}, pipe_pair));
    if (c == PAIRS - 1) begin
      res_due.push_back(cycle + PIPE_LAT);
      res_val.push_back(32'hA5A5_0000 ^ 32'(p));
    end
    exp_word++;
  end

  always @(posedge clk) if (rst_n && bram_we) begin
    checks++;
    if (int'(bram_addr) != exp_res || bram_wdata != (32'hA5A5_0000 ^ 32'(exp_res)))
      fail($sformatf("bram write addr %0d data %h", bram_addr, bram_wdata));
    exp_res++;
  end

  task automatic run(input int b, input int n, input bit restart);
    int t0;
    run_base = b; run_n = n; exp_word = 0; exp_res = 0;
    @(posedge clk);
    start <= 1; npoints <= 16'(n); base <= AW'(b);
    @(posedge clk);
    reads = 0;
    start <= 0;
    t0 = cycle;
    @(posedge clk);
    if (restart) begin
      repeat (5) @(posedge clk);
      start <= 1; base <= '0; npoints <= 16'd3;
      @(posedge clk);
      start <= 0;
    end
    while (!done) begin
      @(posedge clk);
      if (cycle - t0 > 100000) break;
    end
    checks++;
    if (exp_word != n * PAIRS || exp_res != n || reads != n * PAIRS || busy)
      fail($sformatf("run n=%0d: words %0d results %0d reads %0d", n, exp_word, exp_res, reads));
    // read rate: n*6 reads then the pipeline drain
    checks++;
    if (n > 0 && cycle - t0 > n * PAIRS + LAT + PIPE_LAT + 6)
      fail($sformatf("run took %0d cycles", cycle - t0));
  endtask

  initial begin
    start = 0; npoints = '0; base = '0; h_we = 0; h_addr = '0; h_wdata = '0;
    res_valid = 0; res_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < (1 << AW); a++) begin
      image[a] = $urandom();
      h_we <= 1; h_addr <= AW'(a); h_wdata <= image[a];
      @(posedge clk);
    end
    h_we <= 0;
    run(0, 20, 0);
    run(100, 37, 1);
    run(7, 0, 0);
    run(1000, 300, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
