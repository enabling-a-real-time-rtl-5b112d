// tb_param_regs: checks the mean/variance register arrays.
//
// Writes random means and variances, including writes to out-of-range
// indices that must be ignored, then reads every dimension pair through the
// pipeline port and every entry through the host port.
module tb_param_regs;
  import em_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       wr_en, wr_sigma, hr_sigma;
  logic [3:0] wr_idx, hr_idx;
  frac16_t    wr_data, hr_data;
  logic [2:0] rd_pair;
  frac16_t    rd_mu [LANES], rd_sigma [LANES];

  param_regs dut (.clk, .rst_n, .wr_en, .wr_sigma, .wr_idx, .wr_data, .rd_pair, .rd_mu,
                  .rd_sigma, .hr_sigma, .hr_idx, .hr_data);

  int checks = 0, failures = 0;
  logic [15:0] mus [DIMS], sgs [DIMS];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [15:0] got, input logic [15:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("%s: got %h exp %h", what, got, exp_v);
    end
  endtask

  initial begin
    wr_en = 0; wr_sigma = 0; wr_idx = '0; wr_data = '0; hr_sigma = 0; hr_idx = '0; rd_pair = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      for (int k = 0; k < DIMS; k++) begin
        mus[k] = 16'($urandom());
        sgs[k] = 16'($urandom());
        wr_en <= 1; wr_sigma <= 0; wr_idx <= 4'(k); wr_data <= mus[k];
        @(posedge clk);
        wr_sigma <= 1; wr_data <= sgs[k];
        @(posedge clk);
      end
      // out-of-range writes must not disturb anything
      wr_sigma <= 0; wr_idx <= 4'd12; wr_data <= 16'hDEAD;
      @(posedge clk);
      wr_sigma <= 1; wr_idx <= 4'd15;
      @(posedge clk);
      wr_en <= 0;
      @(posedge clk);
      for (int c = 0; c < PAIRS; c++) begin
        rd_pair = 3'(c);
        #1;
        for (int l = 0; l < LANES; l++) begin
          chk(rd_mu[l], mus[c * LANES + l], "pair mean");
          chk(rd_sigma[l], sgs[c * LANES + l], "pair sigma");
        end
      end
      for (int k = 0; k < DIMS; k++) begin
        hr_idx = 4'(k);
        hr_sigma = 0; #1 chk(hr_data, mus[k], "host mean");
        hr_sigma = 1; #1 chk(hr_data, sgs[k], "host sigma");
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
