// tb_filter_snr - output quality of the probabilistic matched filter under
// BIVOS against uniform voltage scaling.
//
// Three copies of the filter see the same stream of random 4-point blocks and
// the same filter spectrum: one with the binned BIVOS error profile, one with
// p = 0.95 on every bit (uniform scaling), and one with the exact profile as
// reference. The signal-to-noise ratio 10 log10(sum y^2 / sum (y - y_exact)^2)
// of each probabilistic copy is measured over 3000 blocks. BIVOS must be
// clearly better than uniform scaling (by at least 6 dB), and all three copies
// must deliver every block. The exact copy's results themselves are compared
// with an independent model in tb_pcmos_matched_filter.
module tb_filter_snr;
  import pcmos_pkg::*;
  localparam int NBLK = 3000;
  logic clk = 0, rst_n = 0, in_valid = 0;
  csample_t x [NPOINT], h [NPOINT];
  logic vb, vu, ve, sb, su, se;
  cspec_t yb [NPOINT], yu [NPOINT], ye [NPOINT];
  int checks = 0, failures = 0, nout = 0;
  real sig = 0.0, eb = 0.0, eu = 0.0;

  pcmos_matched_filter #(.PROFILE(PROF_BIVOS)) u_b (
    .clk, .rst_n, .noise_en(1'b1), .in_valid, .x_i(x), .h_i(h), .out_valid(vb), .y_o(yb), .sat_o(sb));
  pcmos_matched_filter #(.PROFILE(PROF_UNIFORM)) u_u (
    .clk, .rst_n, .noise_en(1'b1), .in_valid, .x_i(x), .h_i(h), .out_valid(vu), .y_o(yu), .sat_o(su));
  pcmos_matched_filter #(.PROFILE(PROF_EXACT)) u_e (
    .clk, .rst_n, .noise_en(1'b1), .in_valid, .x_i(x), .h_i(h), .out_valid(ve), .y_o(ye), .sat_o(se));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (rst_n && ve) begin
      nout++;
      for (int k = 0; k < NPOINT; k++) begin
        int r0, i0;
        r0 = int'(ye[k].re); i0 = int'(ye[k].im);
        sig += real'(r0 * r0 + i0 * i0);
        eb  += real'((int'(yb[k].re) - r0) ** 2 + (int'(yb[k].im) - i0) ** 2);
        eu  += real'((int'(yu[k].re) - r0) ** 2 + (int'(yu[k].im) - i0) ** 2);
      end
    end
  end

  initial begin
    real snr_b, snr_u;
    for (int k = 0; k < NPOINT; k++) begin
      x[k] = '0;
      h[k].re = 6'($urandom_range(40) - 20);
      h[k].im = 6'($urandom_range(40) - 20);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < NBLK; n++) begin
      @(negedge clk);
      in_valid = 1;
      for (int k = 0; k < NPOINT; k++) begin x[k].re = 6'($urandom); x[k].im = 6'($urandom); end
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    snr_b = 10.0 * $log10(sig / eb);
    snr_u = 10.0 * $log10(sig / eu);
    $display("blocks out %0d: SNR BIVOS %0.1f dB, uniform %0.1f dB", nout, snr_b, snr_u);
    checks += 3;
    if (nout != NBLK)        begin failures++; $display("FAIL block count"); end
    if (vb != ve || vu != ve) begin failures++; $display("FAIL valid mismatch"); end
    if (snr_b < snr_u + 6.0) begin failures++; $display("FAIL BIVOS not better than uniform"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
