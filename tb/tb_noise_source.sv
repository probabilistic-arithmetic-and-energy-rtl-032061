// tb_noise_source - checks the noise model's flip rates.
//  * 12-bit binned BIVOS profile: bits 11..7 must never flip (p = 1), bit 6
//    must flip about 5 % of the cycles, bits 5..3 about 10 %, bits 2..0 about
//    20 %; measured over 40000 cycles and 2 lanes, tolerance +-1 % absolute.
//  * 6-bit geometric profile p0 = 0.8, a = 0.01, r = 2: p = 0.80, 0.81, 0.83,
//    0.87, 0.95, 1.0 for bits 0..5.
//  * with en low nothing flips, and the two lanes are not identical.
module tb_noise_source;
  import pcmos_pkg::*;
  localparam int W = 12;
  localparam int NCYC = 40000;
  logic clk = 0, rst_n = 0, en = 0;
  logic [1:0][W-1:0] fl;
  logic [0:0][5:0]   fg;
  int checks = 0, failures = 0;

  noise_source #(.WIDTH(W), .LANES(2), .PROFILE(PROF_BIVOS), .SEED(32'hC0FFEE))
    dut (.clk, .rst_n, .en, .flips(fl));
  noise_source #(.WIDTH(6), .LANES(1), .PROFILE(PROF_GEOMETRIC), .P0(0.8), .A(0.01), .R(2.0))
    dut_g (.clk, .rst_n, .en, .flips(fg));

  always #5 clk = ~clk;

  int cnt [W];
  int cntg [6];
  int quiet_flips = 0, lane_diff = 0;

  task automatic rate_check(string what, int bit_i, int count, int total, real p_exp);
    real rate;
    rate = real'(count) / real'(total);
    checks++;
    if (p_exp == 1.0 ? count != 0 : (rate < (1.0 - p_exp) - 0.01 || rate > (1.0 - p_exp) + 0.01)) begin
      failures++;
      $display("FAIL %s bit %0d flip rate %f expected %f", what, bit_i, rate, 1.0 - p_exp);
    end
  endtask

  initial begin
    real pb [W];
    real pg [6];
    pb = '{0.8, 0.8, 0.8, 0.9, 0.9, 0.9, 0.95, 1.0, 1.0, 1.0, 1.0, 1.0};
    pg = '{0.80, 0.81, 0.83, 0.87, 0.95, 1.0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (200) begin
      @(posedge clk); #1;
      quiet_flips += $countones(fl) + $countones(fg);
    end
    checks++;
    if (quiet_flips != 0) begin failures++; $display("FAIL flips while disabled"); end
    en = 1;
    @(posedge clk);
    repeat (NCYC) begin
      @(posedge clk); #1;
      for (int i = 0; i < W; i++) cnt[i] += int'(fl[0][i]) + int'(fl[1][i]);
      for (int i = 0; i < 6; i++) cntg[i] += int'(fg[0][i]);
      if (fl[0] != fl[1]) lane_diff++;
    end
    for (int i = 0; i < W; i++) rate_check("bivos", i, cnt[i], 2 * NCYC, pb[i]);
    for (int i = 0; i < 6; i++) rate_check("geometric", i, cntg[i], NCYC, pg[i]);
    checks++;
    if (lane_diff < NCYC / 4) begin failures++; $display("FAIL lanes are correlated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
