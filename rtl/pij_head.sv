// pij_head: per-dimension head of the p_ij pipeline.
//
// For one dimension k of datapoint y_i and cluster j it computes
//     term = ((y_ik - mu_jk) / sigma_jk)^2
// as drawn at the top of the p_ij dataflow: a subtractor, a divider and a
// multiplier that squares the quotient. The design instantiates two copies,
// one per half of a 32-bit SRAM word.
//
// Inputs y, mu and sigma are unsigned 0.16 fractions (the host scales all data
// into [0,1)). The difference is formed as a magnitude, since only its square
// is used; it is divided by sigma giving an unsigned 16.16 quotient, and the
// square is returned in 16.16, saturated to 0x7FFF_FFFF so that it is a valid
// positive signed value. sigma = 0 gives the saturated value.
//
// Timing: fully pipelined, one operand set per cycle, LATENCY = 34 cycles
// (1 subtract, 32 divider stages, 1 square). A TW-bit tag travels along.
// The magnitude trick, the divider structure and the saturation are this
// design's own choices; the operation sequence follows the document.
module pij_head
  import em_pkg::*;
#(
  parameter int unsigned TW = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  frac16_t       y,
  input  frac16_t       mu,
  input  frac16_t       sigma,
  input  logic [TW-1:0] in_tag,
  output logic          out_valid,
  output ufix32_t       term,
  output logic [TW-1:0] out_tag
);
  localparam int unsigned LATENCY = 34;

  // Stage 1: |y - mu|
  logic          s1_valid;
  logic [15:0]   s1_absd;
  frac16_t       s1_sigma;
  logic [TW-1:0] s1_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end
  always_ff @(posedge clk) begin
    s1_absd  <= (y >= mu) ? (y - mu) : (mu - y);
    s1_sigma <= sigma;
    s1_tag   <= in_tag;
  end

  // Stages 2..33: quotient = |d| / sigma in 16.16 -> numerator |d| << 16
  logic          q_valid;
  logic [31:0]   q;
  logic [TW-1:0] q_tag;

  fix_div #(.NW(32), .DW(16), .TW(TW)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s1_valid),
    .num      ({s1_absd, 16'h0000}),
    .den      (s1_sigma),
    .in_tag   (s1_tag),
    .out_valid(q_valid),
    .quot     (q),
    .out_tag  (q_tag)
  );

  // Stage 34: square, rescale to 16.16, saturate
  logic [63:0] sq;
  assign sq = 64'(q) * 64'(q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= q_valid;
  end
  always_ff @(posedge clk) begin
    out_tag <= q_tag;
    if (sq[63:47] != '0) term <= ufix32_t'(FIX_MAX);
    else                 term <= sq[47:16];
  end
endmodule
