// fix_div: fully pipelined unsigned restoring divider.
//
// Computes quot = num / den, one quotient bit per pipeline stage, so it takes a
// new operand pair every cycle and returns the quotient QW cycles later
// (LATENCY = QW). A zero divisor returns all ones (the largest quotient). A
// user field of width TW rides along with each operation. Used by the p_ij
// head for the division by the variance term; the restoring algorithm and the
// one-bit-per-stage pipelining are this design's choices.
module fix_div #(
  parameter int unsigned NW = 32,  // numerator width (= quotient width)
  parameter int unsigned DW = 16,  // divisor width
  parameter int unsigned TW = 1    // width of the sideband carried along
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  input  logic [TW-1:0] in_tag,
  output logic          out_valid,
  output logic [NW-1:0] quot,
  output logic [TW-1:0] out_tag
);
  localparam int unsigned QW = NW;

  // Per stage: partial remainder, the numerator bits not yet consumed
  // (shifted left each stage), the divisor and the quotient built so far.
  logic [DW:0]   rem_q [QW+1];
  logic [NW-1:0] num_q [QW+1];
  logic [DW-1:0] den_q [QW+1];
  logic [QW-1:0] quo_q [QW+1];
  logic [TW-1:0] tag_q [QW+1];
  logic          vld_q [QW+1];

  always_comb begin
    rem_q[0] = '0;
    num_q[0] = num;
    den_q[0] = den;
    quo_q[0] = '0;
    tag_q[0] = in_tag;
    vld_q[0] = in_valid;
  end

  for (genvar s = 0; s < QW; s++) begin : g_stage
    logic [DW+1:0] trial;
    logic [DW+1:0] shifted;
    always_comb begin
      shifted = {rem_q[s], num_q[s][NW-1]};
      trial   = shifted - {2'b00, den_q[s]};
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vld_q[s+1] <= 1'b0;
      end else begin
        vld_q[s+1] <= vld_q[s];
      end
    end
    always_ff @(posedge clk) begin
      num_q[s+1] <= num_q[s] << 1;
      den_q[s+1] <= den_q[s];
      tag_q[s+1] <= tag_q[s];
      if (!trial[DW+1]) begin
        rem_q[s+1] <= trial[DW:0];
        quo_q[s+1] <= {quo_q[s][QW-2:0], 1'b1};
      end else begin
        rem_q[s+1] <= shifted[DW:0];
        quo_q[s+1] <= {quo_q[s][QW-2:0], 1'b0};
      end
    end
  end

  assign out_valid = vld_q[QW];
  assign quot      = quo_q[QW];
  assign out_tag   = tag_q[QW];
endmodule
