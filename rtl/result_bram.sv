// result_bram: dual-ported on-chip BlockRAM for the 32-bit p_ij results.
//
// Port A is written by the pipeline (one result per datapoint), port B is read
// by the DMA controller. Both ports share one clock. A read on port B returns
// the word on the next cycle (registered output, as in an FPGA block RAM); a
// read of the address being written in the same cycle returns the old word.
//
// DEPTH defaults to 1024 words: two 18-kbit block RAMs organised 512 x 32,
// matching the two block RAMs the design is reported to use. The document does
// not give the depth; that is this design's estimate.
module result_bram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 32,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A: write
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [W-1:0]  a_wdata,
  // port B: read
  input  logic          b_re,
  input  logic [AW-1:0] b_addr,
  output logic [W-1:0]  b_rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
  end

  always_ff @(posedge clk) begin
    if (b_re) b_rdata <= mem[b_addr];
  end
endmodule
