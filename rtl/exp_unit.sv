// exp_unit: e^x for a signed 16.16 fixed-point argument.
//
// The exponential is rewritten as a power of two, e^x = 2^(x*log2 e). The
// product w = x*log2(e) is split into an integer part n and a fraction f.
// 2^f is read from a 257-entry table indexed by the top 8 bits of f and
// linearly interpolated with the low 8 bits; the result is then shifted by n.
// The table is computed at elaboration from an exact integer recurrence
// (entry i = 2^(i/256) in 1.16, rounded); no data file is needed.
//
// Output is unsigned 16.16, saturated to 0x7FFF_FFFF for x >= ~10.4 and
// flushed to 0 where the true value is below one LSB. Accuracy is about 1e-5
// relative plus one LSB.
//
// Timing: fully pipelined, LATENCY = 3 cycles, one argument per cycle.
// The document only names an e^ operator and reports LUTs used as ROMs; the
// table-and-interpolate method is this design's choice.
module exp_unit
  import em_pkg::*;
#(
  parameter int unsigned TW = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  fix32_t        x,
  input  logic [TW-1:0] in_tag,
  output logic          out_valid,
  output ufix32_t       y,
  output logic [TW-1:0] out_tag
);
  localparam int unsigned LATENCY = 3;
  localparam int unsigned EW = 18;               // table entry width (1.16 up to 2.0)
  localparam logic [16:0] LOG2E = 17'd94548;     // round(log2(e) * 2^16)

  // 2^(i/256) * 2^16 for i = 0..256, by repeated multiplication with
  // round(2^(1/256) * 2^40) at 40 fractional bits.
  function automatic logic [257*EW-1:0] gen_table();
    logic [127:0] r;
    logic [127:0] c;
    logic [257*EW-1:0] t;
    r = 128'd1 << 40;
    c = 128'd1102492706220;
    t = '0;
    for (int i = 0; i < 257; i++) begin
      t[i*EW +: EW] = EW'((r + (128'd1 << 23)) >> 24);
      r = (r * c + (128'd1 << 39)) >> 40;
    end
    return t;
  endfunction

  localparam logic [257*EW-1:0] POW2_TABLE = gen_table();

  function automatic logic [EW-1:0] rom(input logic [8:0] idx);
    return POW2_TABLE[idx*EW +: EW];
  endfunction

  // Stage 1: w = x * log2(e) in 16.16 (up to 17 integer bits)
  logic signed [49:0] prod;
  assign prod = 50'(x) * $signed({1'b0, LOG2E});

  logic               s1_valid;
  logic signed [33:0] s1_w;
  logic [TW-1:0]      s1_tag;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid;
  end
  always_ff @(posedge clk) begin
    s1_w   <= 34'(prod >>> 16);
    s1_tag <= in_tag;
  end

  // Stage 2: 2^f by table lookup and interpolation; keep n
  logic signed [17:0] n_c;
  logic [7:0]         idx_c, lo_c;
  logic [EW-1:0]      a_c, b_c, v_c;
  logic [EW+7:0]      dlt_c;
  always_comb begin
    n_c   = s1_w[33:16];
    idx_c = s1_w[15:8];
    lo_c  = s1_w[7:0];
    a_c   = rom({1'b0, idx_c});
    b_c   = rom(9'(idx_c) + 9'd1);
    dlt_c = (EW+8)'(b_c - a_c) * (EW+8)'(lo_c);
    v_c   = a_c + EW'(dlt_c >> 8);
  end

  logic               s2_valid;
  logic signed [17:0] s2_n;
  logic [EW-1:0]      s2_v;
  logic [TW-1:0]      s2_tag;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_valid <= 1'b0;
    else        s2_valid <= s1_valid;
  end
  always_ff @(posedge clk) begin
    s2_n   <= n_c;
    s2_v   <= v_c;
    s2_tag <= s1_tag;
  end

  // Stage 3: scale by 2^n with saturation / underflow to zero
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s2_valid;
  end
  always_ff @(posedge clk) begin
    out_tag <= s2_tag;
    if (s2_n >= 18'sd15)       y <= ufix32_t'(FIX_MAX);
    else if (s2_n <= -18'sd18) y <= '0;
    else if (s2_n >= 0)        y <= 32'(s2_v) << s2_n[3:0];
    else                       y <= 32'(s2_v) >> 5'(-s2_n);
  end
endmodule
