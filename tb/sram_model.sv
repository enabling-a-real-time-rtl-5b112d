// sram_model: behavioural model of the board's synchronous SRAM.
//
// 32-bit words, AW address bits. A write (we) stores wdata at addr on the
// clock edge. A read (re) returns the word at addr LAT cycles later on rdata,
// which holds its value until the next read completes. Only for simulation.
module sram_model #(
  parameter int unsigned AW  = 19,
  parameter int unsigned LAT = 2
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic          re,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  logic [31:0] mem [logic [AW-1:0]];
  logic [31:0] pipe [LAT];
  logic        pv   [LAT];
  int unsigned reads = 0;

  initial begin
    rdata = '0;
    for (int i = 0; i < LAT; i++) begin
      pipe[i] = '0;
      pv[i]   = 1'b0;
    end
  end

  always @(posedge clk) begin
    logic [31:0] word;
    word = mem.exists(addr) ? mem[addr] : 32'h0;
    for (int i = LAT - 1; i > 0; i--) begin
      pipe[i] <= pipe[i-1];
      pv[i]   <= pv[i-1];
    end
    pipe[0] <= re ? word : 32'h0;
    pv[0]   <= re;
    if (re) reads <= reads + 1;
    if (LAT == 1) begin
      if (re) rdata <= word;
    end else if (pv[LAT-2]) begin
      rdata <= pipe[LAT-2];
    end
    if (we) mem[addr] = wdata;  // read-before-write in one cycle
  end
endmodule
