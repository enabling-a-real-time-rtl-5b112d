// pij_pipeline: the complete p_ij * pi_j datapath for one cluster.
//
// Each cycle it accepts one 32-bit SRAM word holding two 16-bit coordinates
// of a datapoint (dimensions 2c and 2c+1 for pair index c), together with the
// matching means and variances. Two pij_head lanes compute the normalised
// squared distances in parallel, pij_accum sums them over the six words of a
// datapoint and halves the sum, and pij_tail applies varsum, the exponential
// and the mixture proportion. One 16.16 result per datapoint leaves on
// out_valid/result, one every DIMS/LANES = 6 cycles at full input rate.
//
// Timing: LATENCY from the word tagged last to out_valid is
// 34 (head) + 2 (accumulator) + 5 (tail) = 41 cycles. No back-pressure: the
// consumer (the result BlockRAM) always accepts.
module pij_pipeline
  import em_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  frac16_t   y     [LANES],
  input  frac16_t   mu    [LANES],
  input  frac16_t   sigma [LANES],
  input  pair_tag_t in_tag,
  input  fix32_t    varsum,
  input  frac16_t   mixture,
  output logic      out_valid,
  output ufix32_t   result
);
  localparam int unsigned LATENCY = 41;

  logic      h_valid [LANES];
  ufix32_t   h_term  [LANES];
  pair_tag_t h_tag   [LANES];

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    pij_head #(.TW($bits(pair_tag_t))) u_head (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .y        (y[l]),
      .mu       (mu[l]),
      .sigma    (sigma[l]),
      .in_tag   (in_tag),
      .out_valid(h_valid[l]),
      .term     (h_term[l]),
      .out_tag  (h_tag[l])
    );
  end

  logic    a_valid;
  ufix32_t a_half;
  pij_accum #(.M(LANES)) u_accum (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (h_valid[0]),
    .term     (h_term),
    .in_tag   (h_tag[0]),
    .out_valid(a_valid),
    .half_sum (a_half)
  );

  pij_tail u_tail (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (a_valid),
    .half_sum (a_half),
    .varsum   (varsum),
    .mixture  (mixture),
    .out_valid(out_valid),
    .result   (result)
  );


  // Both lanes are identical pipelines fed together: they must stay in step.
  a_lanes_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    h_valid[0] == h_valid[LANES-1] && (!h_valid[0] || h_tag[0] == h_tag[LANES-1]));

endmodule
