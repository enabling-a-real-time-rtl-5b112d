// pij_tail: exponent, exponential and mixture scaling of the p_ij pipeline.
//
// From the halved distance sum S/2 of one datapoint it forms
//     x = varsum - S/2,   result = pi_j * e^x
// where varsum is a per-cluster constant supplied by the host: the natural
// log of the normalisation factor (2*pi)^(-D/2) * (prod_k sigma_jk)^(-1/2).
// The result is therefore p_ij * pi_j, ready for the host to normalise into
// E[z_ij]. x saturates to the signed 16.16 range; the exponential is the
// exp_unit; the product with the 0.16 mixture proportion is truncated to
// 16.16.
//
// Timing: fully pipelined, LATENCY = 5 cycles (subtract, 3 exp stages,
// multiply). varsum and mixture are sampled with their datum, so they may
// change between datapoints. The operator sequence follows the document's dataflow; which
// operand of the subtractor is negated, and what the host puts into varsum,
// are this design's reading of it.
module pij_tail
  import em_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  ufix32_t half_sum,
  input  fix32_t  varsum,
  input  frac16_t mixture,
  output logic    out_valid,
  output ufix32_t result
);
  // Stage 1: x = varsum - half_sum, saturated to 32-bit signed
  logic signed [33:0] diff_c;
  assign diff_c = 34'(varsum) - $signed({2'b00, half_sum});

  logic    s1_valid;
  fix32_t  s1_x;
  frac16_t s1_mix;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end
  always_ff @(posedge clk) begin
    s1_mix <= mixture;
    if (diff_c < 34'(FIX_MIN))      s1_x <= FIX_MIN;
    else if (diff_c > 34'(FIX_MAX)) s1_x <= FIX_MAX;
    else                            s1_x <= diff_c[31:0];
  end

  // Stages 2..4: e^x; the mixture proportion rides along as the tag
  logic    e_valid;
  ufix32_t e_val;
  frac16_t e_mix;
  exp_unit #(.TW(16)) u_exp (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s1_valid),
    .x        (s1_x),
    .in_tag   (s1_mix),
    .out_valid(e_valid),
    .y        (e_val),
    .out_tag  (e_mix)
  );

  // Stage 5: multiply by pi_j (0.16)
  logic [47:0] prod_c;
  assign prod_c = 48'(e_val) * 48'(e_mix);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      result    <= '0;
    end else begin
      out_valid <= e_valid;
      if (e_valid) result <= prod_c[47:16];
    end
  end
endmodule
