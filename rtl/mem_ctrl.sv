// mem_ctrl: memory controller that streams datapoints from SRAM into the
// p_ij pipeline and stores its results.
//
// After a start pulse it reads npoints * 6 consecutive 32-bit SRAM words from
// word address base, one per cycle. Word 6*i + c holds coordinates 2c (low
// half) and 2c+1 (high half) of datapoint i. Each word is handed to the
// pipeline SRAM_LAT cycles after its read, together with its pair index c
// (used to select means and variances) and first/last marks for the
// accumulator. Every result the pipeline returns is written to the result
// BlockRAM at the next address, starting at 0. When npoints results have been
// written, busy falls and done rises; done stays high until the next start.
//
// Interface: start is a one-cycle pulse, ignored while busy; npoints must be
// at most the BlockRAM depth (2^RAW). The SRAM is a synchronous device with a
// fixed read latency of SRAM_LAT cycles and no wait states.
// Timing: npoints * 6 read cycles, plus SRAM_LAT and the pipeline latency.
// The word layout, the latency model and the done handshake are this design's
// choices; the document gives the controller's role and the two-per-cycle
// rate.
module mem_ctrl
  import em_pkg::*;
#(
  parameter int unsigned SRAM_AW  = 19,
  parameter int unsigned SRAM_LAT = 2,
  parameter int unsigned RAW      = 10,   // result address width
  parameter int unsigned NW       = 16    // npoints width
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [NW-1:0]      npoints,
  input  logic [SRAM_AW-1:0] base,
  output logic               busy,
  output logic               done,
  // SRAM read port
  output logic               sram_re,
  output logic [SRAM_AW-1:0] sram_raddr,
  input  logic [31:0]        sram_rdata,
  // to the pipeline
  output logic               pipe_valid,
  output frac16_t            pipe_y [LANES],
  output logic [2:0]         pipe_pair,
  output pair_tag_t          pipe_tag,
  // from the pipeline
  input  logic               res_valid,
  input  ufix32_t            res_data,
  // result BlockRAM write port
  output logic               bram_we,
  output logic [RAW-1:0]     bram_addr,
  output ufix32_t            bram_wdata
);
  typedef enum logic [1:0] {S_IDLE, S_READ, S_DRAIN} state_t;
  state_t state;

  logic [NW-1:0]      pt_cnt;    // datapoint being read
  logic [2:0]         pair_cnt;  // word within the datapoint
  logic [SRAM_AW-1:0] addr;
  logic [NW-1:0]      res_cnt;   // results written
  logic [NW-1:0]      n_q;

  logic issue;
  assign issue = (state == S_READ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      pt_cnt   <= '0;
      pair_cnt <= '0;
      addr     <= '0;
      res_cnt  <= '0;
      n_q      <= '0;
      done     <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          done     <= 1'b0;
          n_q      <= npoints;
          pt_cnt   <= '0;
          pair_cnt <= '0;
          addr     <= base;
          res_cnt  <= '0;
          state    <= (npoints == '0) ? S_DRAIN : S_READ;
        end
        S_READ: begin
          addr <= addr + 1'b1;
          if (int'(pair_cnt) == PAIRS - 1) begin
            pair_cnt <= '0;
            pt_cnt   <= pt_cnt + 1'b1;
            if (pt_cnt == n_q - 1'b1) state <= S_DRAIN;
          end else begin
            pair_cnt <= pair_cnt + 1'b1;
          end
        end
        S_DRAIN: if (res_cnt == n_q) begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
      if (res_valid) res_cnt <= res_cnt + 1'b1;
    end
  end

  assign busy       = (state != S_IDLE);
  assign sram_re    = issue;
  assign sram_raddr = addr;

  // Tags of outstanding reads, aligned with the SRAM read latency.
  logic       tv_q [SRAM_LAT+1];
  logic [2:0] tp_q [SRAM_LAT+1];
  pair_tag_t  tt_q [SRAM_LAT+1];

  always_comb begin
    tv_q[0]       = issue;
    tp_q[0]       = pair_cnt;
    tt_q[0].first = (pair_cnt == '0);
    tt_q[0].last  = (int'(pair_cnt) == PAIRS - 1);
  end

  for (genvar s = 0; s < SRAM_LAT; s++) begin : g_tag
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        tv_q[s+1] <= 1'b0;
        tp_q[s+1] <= '0;
        tt_q[s+1] <= '0;
      end else begin
        tv_q[s+1] <= tv_q[s];
        tp_q[s+1] <= tp_q[s];
        tt_q[s+1] <= tt_q[s];
      end
    end
  end

  assign pipe_valid = tv_q[SRAM_LAT];
  assign pipe_pair  = tp_q[SRAM_LAT];
  assign pipe_tag   = tt_q[SRAM_LAT];
  for (genvar l = 0; l < LANES; l++) begin : g_y
    assign pipe_y[l] = sram_rdata[16*l +: 16];
  end

  assign bram_we    = res_valid;
  assign bram_addr  = res_cnt[RAW-1:0];
  assign bram_wdata = res_data;

  // The result BlockRAM holds one run; larger data sets are run in chunks.
  a_npoints_fit: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE && start) |-> (32'(npoints) <= (32'd1 << RAW)));
endmodule
