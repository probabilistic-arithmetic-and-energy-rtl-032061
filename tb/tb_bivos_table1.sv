// tb_bivos_table1 - the 32-bit bit-significance example: a 32-bit PCMOS
// ripple-carry adder with binned BIVOS error probabilities (bits 31..20 p=1,
// 19..16 p=0.95, 15..8 p=0.90, 7..0 p=0.80) against the same adder with
// uniform p=0.95 on every bit, both spending the same energy in the design's
// example.
//
// Bit errors are injected on the sum bits, one new draw per cycle, for 50000
// random additions. The error magnitude of one addition is the weight of the
// wrong bits, (result XOR exact) read as an unsigned number. Expected mean:
// sum_i 2^i (1 - p_i) = 55731 for BIVOS and (2^32 - 1) * 0.05 = 214748364.75
// for uniform scaling; the measured means must lie within 6 % (BIVOS) and 4 %
// (uniform). The BIVOS worst case must stay below 2^20, while uniform scaling
// must show an error at or above 2^31.
module tb_bivos_table1;
  import pcmos_pkg::*;
  localparam int W = 32;
  localparam int NSAMP = 50000;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] a, b, s_biv, s_uni;
  logic [0:0][W-1:0] f_biv, f_uni;
  logic co_biv, co_uni;
  int checks = 0, failures = 0;

  noise_source #(.WIDTH(W), .PROFILE(PROF_BIVOS),   .SEED(32'hA5A5_0001)) u_nb (.clk, .rst_n, .en(1'b1), .flips(f_biv));
  noise_source #(.WIDTH(W), .PROFILE(PROF_UNIFORM), .SEED(32'h5A5A_0002)) u_nu (.clk, .rst_n, .en(1'b1), .flips(f_uni));

  bivos_rca #(.WIDTH(W)) u_biv (.a, .b, .cin(1'b0), .flip_s(f_biv[0]), .flip_c('0), .sum(s_biv), .cout(co_biv));
  bivos_rca #(.WIDTH(W)) u_uni (.a, .b, .cin(1'b0), .flip_s(f_uni[0]), .flip_c('0), .sum(s_uni), .cout(co_uni));

  always #5 clk = ~clk;

  initial begin
    real p_biv [W];
    real exp_biv, exp_uni, sum_biv, sum_uni, mean_biv, mean_uni;
    longint max_biv, max_uni;
    exp_biv = 0.0; exp_uni = 0.0;
    for (int i = 0; i < W; i++) begin
      p_biv[i] = (i >= 20) ? 1.0 : (i >= 16) ? 0.95 : (i >= 8) ? 0.90 : 0.80;
      exp_biv += (2.0 ** i) * (1.0 - p_biv[i]);
      exp_uni += (2.0 ** i) * 0.05;
    end
    sum_biv = 0.0; sum_uni = 0.0; max_biv = 0; max_uni = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NSAMP; n++) begin
      logic [W-1:0] exact;
      longint eb, eu;
      a = W'($urandom); b = W'($urandom);
      #1;
      exact = a + b;
      eb = longint'(64'(s_biv ^ exact));
      eu = longint'(64'(s_uni ^ exact));
      sum_biv += real'(eb); sum_uni += real'(eu);
      if (eb > max_biv) max_biv = eb;
      if (eu > max_uni) max_uni = eu;
      @(negedge clk);
    end
    mean_biv = sum_biv / NSAMP; mean_uni = sum_uni / NSAMP;
    $display("expected mean error: BIVOS %0.2f  uniform %0.2f", exp_biv, exp_uni);
    $display("measured mean error: BIVOS %0.2f  uniform %0.2f", mean_biv, mean_uni);
    $display("worst error seen:    BIVOS %0d  uniform %0d", max_biv, max_uni);
    checks += 4;
    if (mean_biv < 0.94 * exp_biv || mean_biv > 1.06 * exp_biv) begin failures++; $display("FAIL BIVOS mean"); end
    if (mean_uni < 0.96 * exp_uni || mean_uni > 1.04 * exp_uni) begin failures++; $display("FAIL uniform mean"); end
    if (max_biv >= (longint'(1) << 20)) begin failures++; $display("FAIL BIVOS worst case"); end
    if (max_uni <  (longint'(1) << 31)) begin failures++; $display("FAIL uniform never hit an MSB"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSAMP + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
