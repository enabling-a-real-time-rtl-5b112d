// pij_accum: m-input adder, accumulator and halving shift of the p_ij pipeline.
//
// The sum over all dimensions of the squared, variance-normalised distances is
// built over time: each cycle the LANES per-dimension terms of one SRAM word
// are added (the m-input adder, m = LANES = 2), and the accumulator adds that
// to the running sum of the current datapoint. The tag marks the first and
// last word of a datapoint; on the last one the total, shifted right by one
// bit (the factor 1/2 of the exponent), is presented for one cycle.
//
// Arithmetic is unsigned 16.16 saturating at 0x7FFF_FFFF, so the halved sum
// is at most 0x3FFF_FFFF. With 12 dimensions and two lanes one result leaves
// every 6 input cycles.
//
// Timing: the result appears 2 cycles after the word tagged last is
// presented. The structure follows the document; saturation and the
// first/last tagging are this design's choices.
module pij_accum
  import em_pkg::*;
#(
  parameter int unsigned M = LANES
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  ufix32_t   term [M],
  input  pair_tag_t in_tag,
  output logic      out_valid,
  output ufix32_t   half_sum
);
  function automatic ufix32_t sat_add(input ufix32_t a, input ufix32_t b);
    logic [32:0] s;
    s = 33'(a) + 33'(b);
    return (s > 33'(FIX_MAX)) ? ufix32_t'(FIX_MAX) : s[31:0];
  endfunction

  // Stage 1: m-input adder
  ufix32_t   lane_sum_c;
  always_comb begin
    lane_sum_c = '0;
    for (int l = 0; l < M; l++) lane_sum_c = sat_add(lane_sum_c, term[l]);
  end

  logic      s1_valid;
  ufix32_t   s1_sum;
  pair_tag_t s1_tag;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end
  always_ff @(posedge clk) begin
    s1_sum <= lane_sum_c;
    s1_tag <= in_tag;
  end

  // Stage 2: accumulator, restarted on the first word of each datapoint
  ufix32_t acc;
  ufix32_t acc_next;
  assign acc_next = s1_tag.first ? s1_sum : sat_add(acc, s1_sum);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      half_sum  <= '0;
    end else begin
      out_valid <= s1_valid && s1_tag.last;
      if (s1_valid) begin
        acc <= acc_next;
        if (s1_tag.last) half_sum <= acc_next >> 1;
      end
    end
  end
endmodule
