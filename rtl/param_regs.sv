// param_regs: register arrays holding one cluster's means and variances.
//
// DIMS entries of mu_jk and DIMS of sigma_jk, each an unsigned 0.16 fraction,
// written one at a time by the host interface. The pipeline reads them two at
// a time: pair index c returns dimensions 2c and 2c+1, matching the two
// coordinates held in one 32-bit SRAM word. A second, host-side read port
// returns any single entry for read-back.
//
// Timing: writes take effect on the clock edge; both read ports are
// combinational. Reset clears all entries. The document places the uploaded
// parameters in small on-chip register arrays; the port structure is this
// design's choice.
module param_regs
  import em_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // host write port
  input  logic       wr_en,
  input  logic       wr_sigma,   // 0: mean array, 1: variance array
  input  logic [3:0] wr_idx,
  input  frac16_t    wr_data,
  // pipeline read port, one dimension pair
  input  logic [2:0] rd_pair,
  output frac16_t    rd_mu    [LANES],
  output frac16_t    rd_sigma [LANES],
  // host read-back port
  input  logic       hr_sigma,
  input  logic [3:0] hr_idx,
  output frac16_t    hr_data
);
  frac16_t mu_q    [DIMS];
  frac16_t sigma_q [DIMS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DIMS; k++) begin
        mu_q[k]    <= '0;
        sigma_q[k] <= '0;
      end
    end else if (wr_en && wr_idx < 4'(DIMS)) begin
      if (wr_sigma) sigma_q[wr_idx] <= wr_data;
      else          mu_q[wr_idx]    <= wr_data;
    end
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      rd_mu[l]    = '0;
      rd_sigma[l] = '0;
      if (int'(rd_pair) < PAIRS) begin
        rd_mu[l]    = mu_q[int'(rd_pair) * LANES + l];
        rd_sigma[l] = sigma_q[int'(rd_pair) * LANES + l];
      end
    end
    hr_data = '0;
    if (hr_idx < 4'(DIMS)) hr_data = hr_sigma ? sigma_q[hr_idx] : mu_q[hr_idx];
  end
endmodule
