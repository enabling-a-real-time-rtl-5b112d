// dma_ctrl: reads the result BlockRAM and feeds the board's DMA master.
//
// A go pulse starts a transfer of len 32-bit words from BlockRAM addresses
// 0 .. len-1. Words are offered on a valid/ready stream (dma_valid, dma_data,
// dma_ready) to the bus-side DMA engine, which moves them to host memory.
// A four-entry FIFO absorbs the one-cycle BlockRAM read latency, so with
// dma_ready held high one word leaves per cycle. busy stays high until the
// last word has been accepted.
//
// The document states that the results are shipped to the host by DMA,
// mastered by the board, from the BlockRAM; the stream handshake and the FIFO
// are this design's choices.
module dma_ctrl #(
  parameter int unsigned AW = 10,
  parameter int unsigned LW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          go,
  input  logic [LW-1:0] len,
  output logic          busy,
  // BlockRAM read port
  output logic          bram_re,
  output logic [AW-1:0] bram_addr,
  input  logic [31:0]   bram_rdata,
  // stream to the DMA master
  output logic          dma_valid,
  output logic [31:0]   dma_data,
  input  logic          dma_ready
);
  localparam int unsigned FD = 4;

  logic [LW-1:0] rd_cnt;   // words read from BlockRAM
  logic [LW-1:0] tx_cnt;   // words accepted downstream
  logic [LW-1:0] len_q;
  logic          active;
  logic          inflight;

  logic [31:0]   fifo [FD];
  logic [1:0]    wp, rp;
  logic [2:0]    count;

  logic push, pop;
  assign push = inflight;
  assign pop  = dma_valid && dma_ready;

  assign bram_re   = active && (rd_cnt != len_q) && (32'(count) + 32'(inflight) < FD);
  assign bram_addr = rd_cnt[AW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      rd_cnt   <= '0;
      tx_cnt   <= '0;
      len_q    <= '0;
      inflight <= 1'b0;
      wp       <= '0;
      rp       <= '0;
      count    <= '0;
    end else begin
      if (!active && go) begin
        active <= (len != '0);
        len_q  <= len;
        rd_cnt <= '0;
        tx_cnt <= '0;
      end else begin
        if (bram_re) rd_cnt <= rd_cnt + 1'b1;
        if (pop) begin
          tx_cnt <= tx_cnt + 1'b1;
          if (tx_cnt == len_q - 1'b1) active <= 1'b0;
        end
      end
      inflight <= bram_re;
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      count <= count + 3'(push) - 3'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) fifo[wp] <= bram_rdata;
  end

  assign busy      = active;
  assign dma_valid = (count != '0);
  assign dma_data  = fifo[rp];

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(push && !pop && count == 3'(FD)));
  a_valid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    dma_valid && !dma_ready |=> dma_valid && $stable(dma_data));
endmodule
