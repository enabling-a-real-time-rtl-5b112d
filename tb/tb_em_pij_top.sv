// tb_em_pij_top: end-to-end test of the p_ij accelerator at its default sizes.
//
// Acts as the host. It generates NPTS 12-dimensional datapoints scattered
// around K = 12 random cluster centres, uploads them once into the SRAM (via
// the SRAM window of the host bus, two 16-bit coordinates per word), then for
// every cluster uploads means, variances, mixture proportion and varsum,
// starts a run, polls STATUS until done, and ships the results out through
// the DMA stream with a random ready pattern. Every result is checked against
// pi_j * (2 pi)^(-D/2) * (prod sigma)^(-1/2) * e^(-S/2) evaluated from the
// exact fixed-point distance sum, within 2e-4 relative + 3 LSB.
//
// One cluster is processed in two chunks with different SRAM base addresses.
// The run time must be 6 cycles per datapoint plus a fixed pipeline delay.
// The testbench counts each mechanism of the design and fails if one never
// happens: run start/done, host/controller SRAM ownership hand-over, chunked
// runs, exponent underflow to zero, exponent saturation, distance-term
// saturation, DMA back-pressure and host writes refused while busy.
module tb_em_pij_top;
  import em_pkg::*;
  import em_ref_pkg::*;

  localparam int NPTS = 1024;   // one full result BlockRAM per cluster
  localparam int K    = 12;     // clusters
  localparam int AW   = 19;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [23:0]   lad_addr;
  logic          lad_wr, lad_rd, lad_rvalid;
  logic [31:0]   lad_wdata, lad_rdata;
  logic [AW-1:0] sram_addr;
  logic          sram_we, sram_re;
  logic [31:0]   sram_wdata, sram_rdata;
  logic          dma_valid, dma_ready;
  logic [31:0]   dma_data;
  logic          done;

  em_pij_top dut (.*);

  sram_model #(.AW(AW), .LAT(2)) u_sram (.clk, .addr(sram_addr), .we(sram_we), .re(sram_re),
                                         .wdata(sram_wdata), .rdata(sram_rdata));

  int checks = 0, failures = 0;
  // mechanism counters
  int n_runs = 0, n_sram_host = 0, n_sram_ctrl = 0, n_chunks = 0, n_underflow = 0;
  int n_exp_sat = 0, n_term_sat = 0, n_dma_stall = 0, n_refused = 0, n_rate_ok = 0;

  logic [15:0] data [NPTS][DIMS];
  logic [15:0] cmu  [K][DIMS];
  logic [15:0] csg  [K][DIMS];
  real         expect_q [$];
  int          got_words = 0;

  always @(posedge clk) if (rst_n) begin
    if (sram_we) n_sram_host++;
    if (sram_re) n_sram_ctrl++;
    if (dma_valid && !dma_ready) n_dma_stall++;
    dma_ready <= ($urandom_range(0, 3) != 0);
  end

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- host bus helpers ----------------
  task automatic bus_wr(input logic [23:0] a, input logic [31:0] d);
    @(negedge clk);
    lad_addr = a; lad_wdata = d; lad_wr = 1;
    @(negedge clk);
    lad_wr = 0;
  endtask

  task automatic bus_rd(input logic [23:0] a, output logic [31:0] d);
    @(negedge clk);
    lad_addr = a; lad_rd = 1;
    @(negedge clk);
    lad_rd = 0;
    d = lad_rdata;
    if (!lad_rvalid) begin
      failures++;
      $display("read of %h without rvalid", a);
    end
  endtask

  // ---------------- stimulus helpers ----------------
  function automatic int clamp16(int v);
    return (v < 0) ? 0 : (v > 65535) ? 65535 : v;
  endfunction

  // varsum = ln((2 pi)^(-D/2) * (prod_k sigma_k)^(-1/2)) in 16.16
  function automatic longint varsum_of(int j);
    real v;
    v = -(real'(DIMS) / 2.0) * $ln(2.0 * 3.14159265358979);
    for (int k = 0; k < DIMS; k++) v -= 0.5 * $ln(real'(csg[j][k]) / 65536.0);
    return longint'(v * 65536.0);
  endfunction

  // ---------------- one run of one cluster over points [p0, p0+n) ----------------
  task automatic run_chunk(input int j, input int p0, input int n, input longint vs);
    logic [31:0] st, rb;
    int t0, t1;
    bus_wr(A_NPOINTS, 32'(n));
    bus_wr(A_BASE, 32'(p0 * PAIRS));
    bus_wr(A_CTRL, 32'h1);
    t0 = $time / 10;
    // try to disturb the run: these writes must be refused
    bus_wr(A_NPOINTS, 32'd3);
    bus_wr(A_MEAN0, 32'h0);
    bus_wr(24'h80_0000 | 24'(p0 * PAIRS), 32'hFFFF_FFFF);
    bus_rd(A_NPOINTS, rb);
    checks++;
    if (rb == 32'(n)) n_refused++;
    else begin failures++; $display("NPOINTS changed during run"); end
    do bus_rd(A_STATUS, st); while (!st[1]);
    t1 = $time / 10;
    n_runs++;
    // expected results of this chunk
    for (int i = p0; i < p0 + n; i++) begin
      longint unsigned s;
      longint x;
      s = 0;
      for (int k = 0; k < DIMS; k++) begin
        longint unsigned t;
        t = ref_term(data[i][k], cmu[j][k], csg[j][k]);
        if (t == SAT) n_term_sat++;
        s += t;
      end
      x = vs - longint'(ref_sat(s) >> 1);
      if (ref_exp_real(x) < 0.5) n_underflow++;
      if (ref_exp_real(x) >= real'(SAT)) n_exp_sat++;
      expect_q.push_back(ref_result(ref_sat(s) >> 1, vs, 32'(5461)));
    end
    // rate: 6 cycles per datapoint plus pipeline and polling overhead
    checks++;
    if (t1 - t0 <= n * PAIRS + 80) n_rate_ok++;
    else begin failures++; $display("run of %0d points took %0d cycles", n, t1 - t0); end
    // ship the results
    bus_wr(A_DMA_LEN, 32'(n));
    bus_wr(A_CTRL, 32'h2);
    while (expect_q.size() != 0) @(posedge clk);
    do bus_rd(A_STATUS, st); while (st[2]);
  endtask

  always @(posedge clk) if (rst_n && dma_valid && dma_ready) begin
    checks++;
    got_words++;
    if (expect_q.size() == 0) begin
      failures++;
      $display("unexpected DMA word");
    end else begin
      real e;
      e = expect_q.pop_front();
      if (!close(real'(dma_data), e, 2e-4, 3.0)) begin
        failures++;
        if (failures < 10) $display("result mismatch got=%0d exp=%f", dma_data, e);
      end
    end
  end

  initial begin
    int centre [K][DIMS];
    lad_addr = '0; lad_wr = 0; lad_rd = 0; lad_wdata = '0; dma_ready = 1;
    // clusters: centres in [0.2, 0.8], spreads 0.02 .. 0.08
    for (int j = 0; j < K; j++) for (int k = 0; k < DIMS; k++) begin
      centre[j][k] = $urandom_range(13107, 52428);
      cmu[j][k] = 16'(centre[j][k]);
      csg[j][k] = 16'($urandom_range(1311, 5243));
    end
    csg[K-1][0] = 16'd1;   // a degenerate variance: distance terms saturate
    for (int k = 0; k < DIMS; k++) csg[0][k] = 16'd1311;  // tight cluster: e^x saturates at its centre
    // datapoints around random centres
    for (int i = 0; i < NPTS; i++) begin
      int j;
      j = $urandom_range(0, K - 1);
      for (int k = 0; k < DIMS; k++)
        data[i][k] = 16'(clamp16(centre[j][k] + int'($urandom_range(0, 2 * 3000)) - 3000));
      if (i % 97 == 5) for (int k = 0; k < DIMS; k++) data[i][k] = cmu[i % K][k]; // on a centre
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // upload datapoints once
    for (int i = 0; i < NPTS; i++)
      for (int c = 0; c < PAIRS; c++)
        bus_wr(24'h80_0000 | 24'(i * PAIRS + c), {data[i][2*c+1], data[i][2*c]});
    // one cluster at a time
    for (int j = 0; j < K; j++) begin
      longint vs;
      logic [31:0] rb;
      vs = varsum_of(j);
      for (int k = 0; k < DIMS; k++) begin
        bus_wr(A_MEAN0 + 24'(k), 32'(cmu[j][k]));
        bus_wr(A_SIGMA0 + 24'(k), 32'(csg[j][k]));
      end
      bus_wr(A_MIXTURE, 32'd5461);
      bus_wr(A_VARSUM, 32'(vs));
      bus_rd(A_VARSUM, rb);
      checks++;
      if (rb != 32'(vs)) failures++;
      if (j == 0) begin
        run_chunk(j, 0, NPTS / 4, vs);
        run_chunk(j, NPTS / 4, NPTS - NPTS / 4, vs);
        n_chunks += 2;
      end else begin
        run_chunk(j, 0, NPTS, vs);
      end
    end
    repeat (20) @(posedge clk);
    checks++;
    if (got_words != K * NPTS || expect_q.size() != 0) begin
      failures++;
      $display("received %0d of %0d results", got_words, K * NPTS);
    end
    $display("mechanisms: runs=%0d host_sram_writes=%0d ctrl_sram_reads=%0d chunks=%0d",
             n_runs, n_sram_host, n_sram_ctrl, n_chunks);
    $display("            exp_underflow=%0d exp_saturate=%0d term_saturate=%0d dma_stalls=%0d refused=%0d rate_ok=%0d",
             n_underflow, n_exp_sat, n_term_sat, n_dma_stall, n_refused, n_rate_ok);
    checks++; if (n_runs == 0)      failures++;
    checks++; if (n_sram_host == 0) failures++;
    checks++; if (n_sram_ctrl != K * NPTS * PAIRS) failures++;
    checks++; if (n_chunks == 0)    failures++;
    checks++; if (n_underflow == 0) failures++;
    checks++; if (n_exp_sat == 0)   failures++;
    checks++; if (n_term_sat == 0)  failures++;
    checks++; if (n_dma_stall == 0) failures++;
    checks++; if (n_refused == 0)   failures++;
    checks++; if (n_rate_ok == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
