// tb_dma_ctrl: checks the BlockRAM-to-DMA streamer.
//
// A real result_bram is filled with random words. Transfers of several
// lengths are started; the DMA side accepts words with a random ready
// pattern, or with ready held high, where one word per cycle is required.
// Every word must arrive in address order, exactly len of them, with valid
// and data held stable while ready is low.
module tb_dma_ctrl;
  localparam int AW = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          go, busy, bram_re, dma_valid, dma_ready;
  logic [15:0]   len;
  logic [AW-1:0] bram_addr, w_addr;
  logic [31:0]   bram_rdata, dma_data, w_data;
  logic          w_we;

  dma_ctrl #(.AW(AW), .LW(16)) dut (.clk, .rst_n, .go, .len, .busy, .bram_re, .bram_addr,
                                    .bram_rdata, .dma_valid, .dma_data, .dma_ready);
  result_bram #(.DEPTH(1 << AW)) u_bram (.clk, .a_we(w_we), .a_addr(w_addr), .a_wdata(w_data),
                                         .b_re(bram_re), .b_addr(bram_addr), .b_rdata(bram_rdata));

  int checks = 0, failures = 0, got = 0, stalls = 0;
  logic [31:0] image [1 << AW];
  bit random_ready;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && dma_valid && dma_ready) begin
      checks++;
      if (dma_data != image[got]) begin
        failures++;
        if (failures < 10) $display("word %0d: got %h exp %h", got, dma_data, image[got]);
      end
      got++;
    end
    if (rst_n && dma_valid && !dma_ready) stalls++;
    dma_ready <= random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
  end

  task automatic xfer(input int n, input bit rnd);
    int t0, cyc;
    random_ready = rnd;
    got = 0;
    @(posedge clk);
    go <= 1; len <= 16'(n);
    @(posedge clk);
    go <= 0;
    @(posedge clk);
    cyc = 0;
    while (busy && cyc < 100000) begin
      @(posedge clk);
      cyc++;
    end
    repeat (5) @(posedge clk);
    checks++;
    if (got != n) begin
      failures++;
      $display("transfer of %0d delivered %0d", n, got);
    end
    if (!rnd && n > 0) begin
      checks++;
      if (cyc > n + 3) begin
        failures++;
        $display("transfer of %0d took %0d cycles", n, cyc);
      end
    end
  endtask

  initial begin
    go = 0; len = '0; w_we = 0; w_addr = '0; w_data = '0; random_ready = 0; dma_ready = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < (1 << AW); i++) begin
      image[i] = $urandom();
      w_we <= 1; w_addr <= AW'(i); w_data <= image[i];
      @(posedge clk);
    end
    w_we <= 0;
    xfer(1, 0);
    xfer(100, 0);
    xfer(1024, 0);
    xfer(0, 0);
    xfer(57, 1);
    xfer(1024, 1);
    checks++;
    if (stalls == 0) failures++;
    $display("ready-low stalls seen: %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
