// em_pkg: types and constants shared by the p_ij accelerator.
//
// The accelerator evaluates the Gaussian likelihood term of the EM E-step for
// one cluster at a time. Inputs (datapoints, means, variances, mixture
// proportions) are scaled by the host into [0,1) and carried as 16-bit pure
// fractions; internal values and results are 32-bit fixed point with 16
// integral and 16 fractional bits. These widths, the 12 dimensions and the two
// parallel lanes follow the design description. The host-bus register map
// below is this design's own choice.
package em_pkg;

  localparam int unsigned DIMS  = 12;          // dimensions per datapoint
  localparam int unsigned LANES = 2;           // datapoints read per SRAM word
  localparam int unsigned PAIRS = DIMS / LANES; // cycles per datapoint (6)
  localparam int unsigned FRAC  = 16;          // fractional bits

  typedef logic [15:0]        frac16_t;  // unsigned 0.16 fraction
  typedef logic signed [31:0] fix32_t;   // signed 16.16 fixed point
  typedef logic [31:0]        ufix32_t;  // unsigned 16.16 fixed point

  localparam fix32_t FIX_MAX = 32'sh7FFF_FFFF;
  localparam fix32_t FIX_MIN = 32'sh8000_0000;

  // Host (LAD) bus word-address map. Bit 23 selects the SRAM window.
  localparam logic [23:0] A_CTRL     = 24'h00_0000; // W: bit0 start p_ij run, bit1 start DMA
  localparam logic [23:0] A_STATUS   = 24'h00_0001; // R: bit0 busy, bit1 done, bit2 dma busy
  localparam logic [23:0] A_NPOINTS  = 24'h00_0002; // RW: datapoints in this run
  localparam logic [23:0] A_MIXTURE  = 24'h00_0003; // RW: pi_j, 0.16
  localparam logic [23:0] A_VARSUM   = 24'h00_0004; // RW: varsum, signed 16.16
  localparam logic [23:0] A_BASE     = 24'h00_0005; // RW: SRAM word address of first datapoint
  localparam logic [23:0] A_DMA_LEN  = 24'h00_0006; // RW: results to ship by DMA
  localparam logic [23:0] A_MEAN0    = 24'h00_0010; // RW: mu_k at 0x10 + k
  localparam logic [23:0] A_SIGMA0   = 24'h00_0020; // RW: sigma_k at 0x20 + k
  localparam int unsigned SRAM_SEL_BIT = 23;

  // Sideband travelling with one lane-pair of a datapoint down the pipeline.
  typedef struct packed {
    logic first;  // first dimension pair of a datapoint
    logic last;   // last dimension pair of a datapoint
  } pair_tag_t;

endpackage
