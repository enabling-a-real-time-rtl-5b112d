// tb_lad_if: checks the host bus interface.
//
// Writes every control register and both register arrays (the arrays here
// are a real param_regs), reads them back with the one-cycle read latency,
// checks that SRAM-window writes reach the SRAM port with the right address
// and data, that CTRL produces one-cycle start and DMA pulses, that STATUS
// reflects busy/done/DMA busy, and that writes are ignored while busy.
module tb_lad_if;
  import em_pkg::*;

  localparam int AW = 19;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [23:0]   lad_addr;
  logic          lad_wr, lad_rd, lad_rvalid;
  logic [31:0]   lad_wdata, lad_rdata;
  logic          sram_we;
  logic [AW-1:0] sram_waddr;
  logic [31:0]   sram_wdata;
  logic          par_we, par_sigma, par_hr_sigma;
  logic [3:0]    par_idx, par_hr_idx;
  frac16_t       par_wdata, par_hr_data;
  logic          start, dma_go;
  logic [15:0]   npoints, dma_len;
  frac16_t       mixture;
  fix32_t        varsum;
  logic [AW-1:0] base;
  logic          busy, done, dma_busy;
  frac16_t       rd_mu [LANES], rd_sigma [LANES];

  lad_if #(.SRAM_AW(AW), .NW(16)) dut (.*);

  param_regs u_par (.clk, .rst_n, .wr_en(par_we), .wr_sigma(par_sigma), .wr_idx(par_idx),
                    .wr_data(par_wdata), .rd_pair(3'd0), .rd_mu, .rd_sigma,
                    .hr_sigma(par_hr_sigma), .hr_idx(par_hr_idx), .hr_data(par_hr_data));

  int checks = 0, failures = 0;
  int starts = 0, dmas = 0, sram_writes = 0;
  logic [31:0] last_sram_data;
  logic [AW-1:0] last_sram_addr;

  always @(posedge clk) if (rst_n) begin
    if (start) starts++;
    if (dma_go) dmas++;
    if (sram_we) begin
      sram_writes++;
      last_sram_addr = sram_waddr;
      last_sram_data = sram_wdata;
    end
  end

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [23:0] a, input logic [31:0] d);
    @(negedge clk);
    lad_addr = a; lad_wdata = d; lad_wr = 1;
    @(negedge clk);
    lad_wr = 0;
  endtask

  task automatic rd_check(input logic [23:0] a, input logic [31:0] exp_v, input string what);
    @(negedge clk);
    lad_addr = a; lad_rd = 1;
    @(negedge clk);
    lad_rd = 0;
    checks++;
    if (!lad_rvalid || lad_rdata !== exp_v) begin
      failures++;
      $display("%s: rvalid %0d got %h exp %h", what, lad_rvalid, lad_rdata, exp_v);
    end
    @(posedge clk);
  endtask

  task automatic expect_eq(input longint got, input longint exp_v, input string what);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("%s: got %0d exp %0d", what, got, exp_v);
    end
  endtask

  logic [15:0] mus [DIMS], sgs [DIMS];

  initial begin
    lad_addr = '0; lad_wr = 0; lad_rd = 0; lad_wdata = '0;
    busy = 0; done = 0; dma_busy = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    wr(A_NPOINTS, 32'd777);
    wr(A_MIXTURE, 32'h0000_1555);
    wr(A_VARSUM, 32'hFFFD_8000);
    wr(A_BASE, 32'd4096);
    wr(A_DMA_LEN, 32'd777);
    for (int k = 0; k < DIMS; k++) begin
      mus[k] = 16'($urandom()); sgs[k] = 16'($urandom());
      wr(A_MEAN0 + 24'(k), {16'hFFFF, mus[k]});
      wr(A_SIGMA0 + 24'(k), 32'(sgs[k]));
    end
    rd_check(A_NPOINTS, 32'd777, "npoints");
    rd_check(A_MIXTURE, 32'h1555, "mixture");
    rd_check(A_VARSUM, 32'hFFFD_8000, "varsum");
    rd_check(A_BASE, 32'd4096, "base");
    rd_check(A_DMA_LEN, 32'd777, "dma_len");
    for (int k = 0; k < DIMS; k++) begin
      rd_check(A_MEAN0 + 24'(k), 32'(mus[k]), "mean");
      rd_check(A_SIGMA0 + 24'(k), 32'(sgs[k]), "sigma");
    end
    expect_eq(npoints, 777, "npoints port");
    expect_eq(varsum, -163840, "varsum port");
    // SRAM window
    wr(24'h80_1234, 32'hCAFE_F00D);
    @(posedge clk);
    expect_eq(sram_writes, 1, "sram write count");
    expect_eq(last_sram_addr, 'h1234, "sram addr");
    expect_eq(last_sram_data, 32'hCAFE_F00D, "sram data");
    // start and DMA pulses
    wr(A_CTRL, 32'h1);
    wr(A_CTRL, 32'h2);
    repeat (2) @(posedge clk);
    expect_eq(starts, 1, "start pulses");
    expect_eq(dmas, 1, "dma pulses");
    // status
    busy = 1; done = 0; dma_busy = 1;
    rd_check(A_STATUS, 32'h5, "status busy");
    // writes ignored while busy
    wr(A_NPOINTS, 32'd5);
    wr(A_MEAN0, 32'h1111);
    wr(24'h80_0001, 32'h1);
    wr(A_CTRL, 32'h3);
    repeat (2) @(posedge clk);
    expect_eq(starts, 1, "start while busy");
    expect_eq(dmas, 1, "dma while dma busy");
    expect_eq(sram_writes, 1, "sram write while busy");
    rd_check(A_NPOINTS, 32'd777, "npoints kept");
    rd_check(A_MEAN0, 32'(mus[0]), "mean kept");
    busy = 0; done = 1; dma_busy = 0;
    rd_check(A_STATUS, 32'h2, "status done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
