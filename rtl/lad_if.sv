// lad_if: host bus (LAD) interface of the p_ij accelerator.
//
// The host writes and reads 32-bit words by word address. Writes with address
// bit 23 set go to the board SRAM (datapoints, two 16-bit coordinates per
// word) at the SRAM word address in the low bits. Other writes reach the
// control registers or the mean/variance register arrays, per the map in
// em_pkg:
//   0x00 CTRL    W  bit0: start a p_ij run, bit1: start a DMA transfer
//   0x01 STATUS  R  bit0: run busy, bit1: run done, bit2: DMA busy
//   0x02 NPOINTS    datapoints in the run      0x03 MIXTURE  pi_j (0.16)
//   0x04 VARSUM     log normalisation (16.16)  0x05 BASE     first SRAM word
//   0x06 DMA_LEN    results to send by DMA
//   0x10+k MEAN k (0.16)                        0x20+k SIGMA k (0.16)
// Reads of registers return data one cycle after lad_rd, with lad_rvalid.
// While a run is busy, SRAM, parameter and start writes are ignored so that
// the operands cannot change under the pipeline.
//
// The document states only that host data arrives on the LAD bus and is
// steered to SRAM or to register arrays, and that a start signal begins the
// run; the register map and this simple single-cycle bus protocol are this
// design's own.
module lad_if
  import em_pkg::*;
#(
  parameter int unsigned SRAM_AW = 19,
  parameter int unsigned NW      = 16
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
  // SRAM host write port
  output logic               sram_we,
  output logic [SRAM_AW-1:0] sram_waddr,
  output logic [31:0]        sram_wdata,
  // register arrays
  output logic               par_we,
  output logic               par_sigma,
  output logic [3:0]         par_idx,
  output frac16_t            par_wdata,
  output logic               par_hr_sigma,
  output logic [3:0]         par_hr_idx,
  input  frac16_t            par_hr_data,
  // control / status
  output logic               start,
  output logic               dma_go,
  output logic [NW-1:0]      npoints,
  output frac16_t            mixture,
  output fix32_t             varsum,
  output logic [SRAM_AW-1:0] base,
  output logic [NW-1:0]      dma_len,
  input  logic               busy,
  input  logic               done,
  input  logic               dma_busy
);
  logic sram_sel;
  assign sram_sel = lad_addr[SRAM_SEL_BIT];

  logic reg_wr;
  assign reg_wr = lad_wr && !sram_sel;

  // SRAM writes
  assign sram_we    = lad_wr && sram_sel && !busy;
  assign sram_waddr = lad_addr[SRAM_AW-1:0];
  assign sram_wdata = lad_wdata;

  // Register-array writes: 0x10..0x1B means, 0x20..0x2B variances
  logic arr_hit;
  assign arr_hit   = (lad_addr[23:6] == '0) && (lad_addr[5:4] == 2'b01 || lad_addr[5:4] == 2'b10);
  assign par_we    = reg_wr && arr_hit && !busy;
  assign par_sigma = lad_addr[5];
  assign par_idx   = lad_addr[3:0];
  assign par_wdata = lad_wdata[15:0];
  assign par_hr_sigma = lad_addr[5];
  assign par_hr_idx   = lad_addr[3:0];

  // Control registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start   <= 1'b0;
      dma_go  <= 1'b0;
      npoints <= '0;
      mixture <= '0;
      varsum  <= '0;
      base    <= '0;
      dma_len <= '0;
    end else begin
      start  <= reg_wr && lad_addr == A_CTRL && lad_wdata[0] && !busy;
      dma_go <= reg_wr && lad_addr == A_CTRL && lad_wdata[1] && !dma_busy;
      if (reg_wr && !busy) begin
        case (lad_addr)
          A_NPOINTS: npoints <= lad_wdata[NW-1:0];
          A_MIXTURE: mixture <= lad_wdata[15:0];
          A_VARSUM:  varsum  <= lad_wdata;
          A_BASE:    base    <= lad_wdata[SRAM_AW-1:0];
          default: ;
        endcase
      end
      if (reg_wr && lad_addr == A_DMA_LEN && !dma_busy) dma_len <= lad_wdata[NW-1:0];
    end
  end

  // Register read-back
  logic [31:0] rdata_c;
  always_comb begin
    rdata_c = '0;
    if (arr_hit) begin
      rdata_c = {16'h0000, par_hr_data};
    end else begin
      case (lad_addr)
        A_STATUS:  rdata_c = {29'd0, dma_busy, done, busy};
        A_NPOINTS: rdata_c = 32'(npoints);
        A_MIXTURE: rdata_c = {16'h0000, mixture};
        A_VARSUM:  rdata_c = varsum;
        A_BASE:    rdata_c = 32'(base);
        A_DMA_LEN: rdata_c = 32'(dma_len);
        default:   rdata_c = '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lad_rvalid <= 1'b0;
      lad_rdata  <= '0;
    end else begin
      lad_rvalid <= lad_rd && !sram_sel;
      if (lad_rd) lad_rdata <= rdata_c;
    end
  end

  a_one_access: assert property (@(posedge clk) disable iff (!rst_n) !(lad_wr && lad_rd));
endmodule
