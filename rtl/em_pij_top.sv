// em_pij_top: FPGA accelerator for the p_ij likelihood matrix of EM clustering.
//
// The host uploads the 12-dimensional datapoints (16-bit fractions, two per
// 32-bit word) into the board SRAM once, then for each cluster j uploads its
// means, variances, mixture proportion and log normalisation constant
// (varsum) into on-chip registers and writes start. The memory controller
// streams the datapoints through the two-lane p_ij pipeline at one SRAM word
// per cycle, so one result p_ij * pi_j (16.16 fixed point) per datapoint is
// produced every 6 cycles and stored in the result BlockRAM. When STATUS.done
// is set the host programs DMA_LEN and starts the DMA controller, which hands
// the results to the board's DMA master. Then the next cluster is processed.
//
// Ports: clk/rst_n (active-low asynchronous reset); the host bus (see lad_if
// for the register map); a synchronous SRAM port with a fixed read latency of
// SRAM_LAT cycles; a valid/ready result stream towards the DMA master; done
// as an interrupt-style level.
// SRAM ownership: while a run is busy the memory controller reads the SRAM;
// otherwise host writes reach it.
module em_pij_top
  import em_pkg::*;
#(
  parameter int unsigned SRAM_AW      = 19,
  parameter int unsigned SRAM_LAT     = 2,
  parameter int unsigned RESULT_DEPTH = 1024,
  parameter int unsigned NW           = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // host bus
  input  logic [23:0]        lad_addr,
  input  logic               lad_wr,
  input  logic [31:0]        lad_wdata,
  input  logic               lad_rd,
  output logic [31:0]        lad_rdata,
  output logic               lad_rvalid,
  // board SRAM
  output logic [SRAM_AW-1:0] sram_addr,
  output logic               sram_we,
  output logic               sram_re,
  output logic [31:0]        sram_wdata,
  input  logic [31:0]        sram_rdata,
  // result stream to the DMA master
  output logic               dma_valid,
  output logic [31:0]        dma_data,
  input  logic               dma_ready,
  // status
  output logic               done
);
  localparam int unsigned RAW = $clog2(RESULT_DEPTH);

  // control
  logic               start, dma_go, busy, dma_busy;
  logic [NW-1:0]      npoints, dma_len;
  frac16_t            mixture;
  fix32_t             varsum;
  logic [SRAM_AW-1:0] base;

  // host SRAM write path
  logic               h_sram_we;
  logic [SRAM_AW-1:0] h_sram_waddr;

  // register arrays
  logic       par_we, par_sigma, par_hr_sigma;
  logic [3:0] par_idx, par_hr_idx;
  frac16_t    par_wdata, par_hr_data;
  frac16_t    rd_mu [LANES], rd_sigma [LANES];

  // memory controller <-> pipeline / SRAM / BlockRAM
  logic               mc_re;
  logic [SRAM_AW-1:0] mc_raddr;
  logic               pipe_valid;
  frac16_t            pipe_y [LANES];
  logic [2:0]         pipe_pair;
  pair_tag_t          pipe_tag;
  logic               res_valid;
  ufix32_t            res_data;
  logic               bram_we;
  logic [RAW-1:0]     bram_waddr;
  ufix32_t            bram_wdata;
  logic               bram_re;
  logic [RAW-1:0]     bram_raddr;
  logic [31:0]        bram_rdata;

  lad_if #(.SRAM_AW(SRAM_AW), .NW(NW)) u_lad (
    .clk, .rst_n,
    .lad_addr, .lad_wr, .lad_wdata, .lad_rd, .lad_rdata, .lad_rvalid,
    .sram_we     (h_sram_we),
    .sram_waddr  (h_sram_waddr),
    .sram_wdata  (sram_wdata),
    .par_we, .par_sigma, .par_idx, .par_wdata,
    .par_hr_sigma, .par_hr_idx, .par_hr_data,
    .start, .dma_go, .npoints, .mixture, .varsum, .base, .dma_len,
    .busy, .done, .dma_busy
  );

  param_regs u_params (
    .clk, .rst_n,
    .wr_en    (par_we),
    .wr_sigma (par_sigma),
    .wr_idx   (par_idx),
    .wr_data  (par_wdata),
    .rd_pair  (pipe_pair),
    .rd_mu    (rd_mu),
    .rd_sigma (rd_sigma),
    .hr_sigma (par_hr_sigma),
    .hr_idx   (par_hr_idx),
    .hr_data  (par_hr_data)
  );

  mem_ctrl #(.SRAM_AW(SRAM_AW), .SRAM_LAT(SRAM_LAT), .RAW(RAW), .NW(NW)) u_mc (
    .clk, .rst_n,
    .start, .npoints, .base, .busy, .done,
    .sram_re    (mc_re),
    .sram_raddr (mc_raddr),
    .sram_rdata (sram_rdata),
    .pipe_valid, .pipe_y, .pipe_pair, .pipe_tag,
    .res_valid, .res_data,
    .bram_we,
    .bram_addr  (bram_waddr),
    .bram_wdata
  );

  pij_pipeline u_pipe (
    .clk, .rst_n,
    .in_valid (pipe_valid),
    .y        (pipe_y),
    .mu       (rd_mu),
    .sigma    (rd_sigma),
    .in_tag   (pipe_tag),
    .varsum   (varsum),
    .mixture  (mixture),
    .out_valid(res_valid),
    .result   (res_data)
  );

  result_bram #(.DEPTH(RESULT_DEPTH), .W(32)) u_bram (
    .clk,
    .a_we    (bram_we),
    .a_addr  (bram_waddr),
    .a_wdata (bram_wdata),
    .b_re    (bram_re),
    .b_addr  (bram_raddr),
    .b_rdata (bram_rdata)
  );

  dma_ctrl #(.AW(RAW), .LW(NW)) u_dma (
    .clk, .rst_n,
    .go        (dma_go),
    .len       (dma_len),
    .busy      (dma_busy),
    .bram_re   (bram_re),
    .bram_addr (bram_raddr),
    .bram_rdata(bram_rdata),
    .dma_valid, .dma_data, .dma_ready
  );

  // SRAM port: controller reads while busy, host writes otherwise.
  assign sram_re   = mc_re;
  assign sram_we   = h_sram_we;
  assign sram_addr = busy ? mc_raddr : h_sram_waddr;
endmodule
