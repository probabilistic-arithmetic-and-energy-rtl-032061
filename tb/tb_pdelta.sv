// tb_pdelta - threshold-magnitude-error characterisation of the three
// probabilistic building blocks, BIVOS against uniform voltage scaling.
//
// p_delta is the fraction of outputs whose magnitude differs from the exact
// result by no more than delta (1 minus the threshold magnitude error rate).
// For each block 1000 uniformly distributed random inputs are applied, and two
// copies of the block see the same inputs: one with the binned BIVOS error
// profile, one with p = 0.95 on every bit. Bit errors are injected on the
// block outputs (FFT: on every adder output, so stage-1 errors propagate).
//   12-bit adder, delta = 128:     BIVOS keeps bits 11..7 exact, so p_delta
//                                  must be 1; uniform must be near 0.80.
//   6-bit multiplier, delta = 128: BIVOS keeps product bits 11..7 exact, so
//                                  p_delta must be 1; uniform well below.
//   4-point FFT, delta = 64:       BIVOS p_delta at least 0.95 and at least
//                                  0.2 above uniform.
module tb_pdelta;
  import pcmos_pkg::*;
  localparam int NPTS = 1000;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // ---- 12-bit adder
  logic [11:0] aa, ab, sb, su;
  logic [0:0][11:0] fab, fau;
  logic cb, cu;
  noise_source #(.WIDTH(12), .PROFILE(PROF_BIVOS),   .SEED(32'h11)) n_ab (.clk, .rst_n, .en(1'b1), .flips(fab));
  noise_source #(.WIDTH(12), .PROFILE(PROF_UNIFORM), .SEED(32'h22)) n_au (.clk, .rst_n, .en(1'b1), .flips(fau));
  bivos_rca u_add_b (.a(aa), .b(ab), .cin(1'b0), .flip_s(fab[0]), .flip_c('0), .sum(sb), .cout(cb));
  bivos_rca u_add_u (.a(aa), .b(ab), .cin(1'b0), .flip_s(fau[0]), .flip_c('0), .sum(su), .cout(cu));

  // ---- 6-bit multiplier
  logic signed [5:0] ma, mb;
  logic signed [11:0] pb, pu;
  logic [0:0][11:0] fmb, fmu;
  noise_source #(.WIDTH(12), .PROFILE(PROF_BIVOS),   .SEED(32'h33)) n_mb (.clk, .rst_n, .en(1'b1), .flips(fmb));
  noise_source #(.WIDTH(12), .PROFILE(PROF_UNIFORM), .SEED(32'h44)) n_mu (.clk, .rst_n, .en(1'b1), .flips(fmu));
  array_mult u_mul_b (.a(ma), .b(mb), .flip_p(fmb[0]), .p(pb));
  array_mult u_mul_u (.a(ma), .b(mb), .flip_p(fmu[0]), .p(pu));

  // ---- 4-point FFT
  csample_t fx [NPOINT];
  cspec_t   fyb [NPOINT], fyu [NPOINT], fye [NPOINT];
  logic [15:0][7:0] ffb, ffu;
  noise_source #(.WIDTH(8), .LANES(16), .PROFILE(PROF_BIVOS),   .SEED(32'h55)) n_fb (.clk, .rst_n, .en(1'b1), .flips(ffb));
  noise_source #(.WIDTH(8), .LANES(16), .PROFILE(PROF_UNIFORM), .SEED(32'h66)) n_fu (.clk, .rst_n, .en(1'b1), .flips(ffu));
  fft4 u_fft_b (.x(fx), .flip_s(ffb), .flip_c('0), .X(fyb));
  fft4 u_fft_u (.x(fx), .flip_s(ffu), .flip_c('0), .X(fyu));
  fft4 u_fft_e (.x(fx), .flip_s('0),  .flip_c('0), .X(fye));

  function automatic int absi(int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic judge(string what, real pd_b, real pd_u, real min_b, real max_u, real min_gap);
    $display("%-18s p_delta BIVOS %0.3f  uniform %0.3f", what, pd_b, pd_u);
    checks += 2;
    if (pd_b < min_b)           begin failures++; $display("FAIL %s BIVOS p_delta", what); end
    if (pd_u > max_u || pd_b - pd_u < min_gap) begin failures++; $display("FAIL %s uniform p_delta", what); end
  endtask

  int ok_ab = 0, ok_au = 0, ok_mb = 0, ok_mu = 0, ok_fb = 0, ok_fu = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < NPTS; n++) begin
      aa = 12'($urandom); ab = 12'($urandom);
      ma = 6'($urandom);  mb = 6'($urandom);
      for (int k = 0; k < NPOINT; k++) begin fx[k].re = 6'($urandom); fx[k].im = 6'($urandom); end
      #1;
      begin
        int ex;
        ex = int'(12'(aa + ab));
        if (absi(int'(sb) - ex) <= 128) ok_ab++;
        if (absi(int'(su) - ex) <= 128) ok_au++;
        ex = int'(ma) * int'(mb);
        if (absi(int'(pb) - ex) <= 128) ok_mb++;
        if (absi(int'(pu) - ex) <= 128) ok_mu++;
        for (int k = 0; k < NPOINT; k++) begin
          if (absi(int'(fyb[k].re) - int'(fye[k].re)) <= 64 && absi(int'(fyb[k].im) - int'(fye[k].im)) <= 64) ok_fb++;
          if (absi(int'(fyu[k].re) - int'(fye[k].re)) <= 64 && absi(int'(fyu[k].im) - int'(fye[k].im)) <= 64) ok_fu++;
        end
      end
      @(negedge clk);
    end
    judge("12-bit adder",     real'(ok_ab) / NPTS, real'(ok_au) / NPTS, 1.0, 0.90, 0.05);
    judge("6-bit multiplier", real'(ok_mb) / NPTS, real'(ok_mu) / NPTS, 1.0, 0.95, 0.05);
    judge("4-point FFT",      real'(ok_fb) / (4 * NPTS), real'(ok_fu) / (4 * NPTS), 0.95, 0.90, 0.2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPTS + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
