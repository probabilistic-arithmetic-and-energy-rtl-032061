// tb_pcmos_matched_filter - end-to-end test of the probabilistic matched
// filter at its default parameters (binned BIVOS noise profile).
//
// A reference model in plain integer arithmetic computes, for every block,
// FFT -> (>>>2) -> complex multiply by h -> (>>>5, saturate to 6 bits) ->
// inverse FFT by real/imaginary swap. The test runs four phases:
//   1. exact mode, small filter, blocks entering on random cycles (bubbles);
//   2. exact mode, large filter, back-to-back blocks; products saturate;
//   3. exact mode again after noise: the result must be exact once more;
//   4. probabilistic mode: results are compared with the exact reference and
//      the signal-to-noise ratio of the output is reported.
// In exact mode every output must match bit for bit, sat_o must match the
// model, and every block must leave exactly 3 cycles after it entered.
// Mechanisms counted (each must occur): pipeline bubble, back-to-back block,
// saturation, noisy output that differs from the exact one, switch between
// exact and probabilistic mode.
module tb_pcmos_matched_filter;
  import pcmos_pkg::*;

  logic clk = 0, rst_n = 0, noise_en = 0, in_valid = 0;
  csample_t x [NPOINT], h [NPOINT];
  logic out_valid, sat;
  cspec_t y [NPOINT];
  int checks = 0, failures = 0;
  longint cycle = 0;

  pcmos_matched_filter dut (
    .clk, .rst_n, .noise_en, .in_valid, .x_i(x), .h_i(h),
    .out_valid, .y_o(y), .sat_o(sat)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct {
    int  re [NPOINT];
    int  im [NPOINT];
    bit  sat;
    longint t_in;
    bit  noisy;
  } expect_t;
  expect_t q [$];

  // counters of mechanisms
  int n_bubble = 0, n_b2b = 0, n_sat = 0, n_noisy_err = 0, n_mode_sw = 0;
  real sig_pow = 0.0, err_pow = 0.0;
  bit prev_valid = 0;

  function automatic void dft4(input int xr [NPOINT], input int xi [NPOINT],
                               output int yr [NPOINT], output int yi [NPOINT]);
    for (int k = 0; k < NPOINT; k++) begin
      yr[k] = 0; yi[k] = 0;
      for (int n = 0; n < NPOINT; n++)
        case ((n * k) % 4)
          0: begin yr[k] += xr[n]; yi[k] += xi[n]; end
          1: begin yr[k] += xi[n]; yi[k] -= xr[n]; end
          2: begin yr[k] -= xr[n]; yi[k] -= xi[n]; end
          default: begin yr[k] -= xi[n]; yi[k] += xr[n]; end
        endcase
    end
  endfunction

  function automatic int wrap8(int v);
    return int'(signed'(8'(v)));
  endfunction

  function automatic int sar(int v, int s);   // arithmetic shift right
    return v >>> s;
  endfunction

  function automatic expect_t model();
    expect_t e;
    int xr [NPOINT], xi [NPOINT], fr [NPOINT], fi [NPOINT];
    int gr [NPOINT], gi [NPOINT], zr [NPOINT], zi [NPOINT];
    e.sat = 0;
    for (int n = 0; n < NPOINT; n++) begin xr[n] = int'(x[n].re); xi[n] = int'(x[n].im); end
    dft4(xr, xi, fr, fi);
    for (int k = 0; k < NPOINT; k++) begin
      int a, b, c, d, yr, yi, hr, hi;
      a = sar(wrap8(fr[k]), 2); b = sar(wrap8(fi[k]), 2);
      hr = int'(h[k].re); hi = int'(h[k].im);
      yr = sar(a * hr - b * hi, 5);
      yi = sar(a * hi + b * hr, 5);
      if (yr > 31)  begin yr = 31;  e.sat = 1; end
      if (yr < -32) begin yr = -32; e.sat = 1; end
      if (yi > 31)  begin yi = 31;  e.sat = 1; end
      if (yi < -32) begin yi = -32; e.sat = 1; end
      // inverse transform by swapping real and imaginary parts
      gr[k] = yi; gi[k] = yr;
    end
    dft4(gr, gi, zr, zi);
    for (int k = 0; k < NPOINT; k++) begin e.re[k] = wrap8(zi[k]); e.im[k] = wrap8(zr[k]); end
    return e;
  endfunction

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      expect_t e;
      if (q.size() == 0) begin
        failures++; $display("FAIL output with nothing in flight");
      end else begin
        bit diff;
        e = q.pop_front();
        checks++;
        if (cycle - e.t_in != 3) begin
          failures++; $display("FAIL latency %0d", cycle - e.t_in);
        end
        diff = 0;
        for (int k = 0; k < NPOINT; k++) begin
          int dr, di;
          dr = int'(y[k].re) - e.re[k];
          di = int'(y[k].im) - e.im[k];
          if (dr != 0 || di != 0) diff = 1;
          if (e.noisy) begin
            sig_pow += real'(e.re[k] * e.re[k] + e.im[k] * e.im[k]);
            err_pow += real'(dr * dr + di * di);
          end
        end
        if (!e.noisy) begin
          checks++;
          if (diff || sat != e.sat) begin
            failures++;
            if (failures < 10) $display("FAIL exact block: diff=%0b sat=%0b expected sat=%0b", diff, sat, e.sat);
          end
          if (sat) n_sat++;
        end else if (diff) n_noisy_err++;
      end
    end
  end

  task automatic run_blocks(int n, int bubble_pct, int hmax, bit noisy);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if ($urandom_range(99) < bubble_pct) begin
        in_valid = 0;
        if (prev_valid) n_bubble++;
        prev_valid = 0;
      end else begin
        expect_t e;
        in_valid = 1;
        for (int p = 0; p < NPOINT; p++) begin
          x[p].re = DATA_W'($urandom); x[p].im = DATA_W'($urandom);
        end
        e = model();
        e.t_in = cycle;         // value the checker sees at the entry edge
        e.noisy = noisy;
        q.push_back(e);
        if (prev_valid) n_b2b++;
        prev_valid = 1;
      end
    end
    @(negedge clk); in_valid = 0; prev_valid = 0;
    repeat (5) @(negedge clk);
  endtask

  task automatic set_filter(int hmax);
    for (int p = 0; p < NPOINT; p++) begin
      h[p].re = DATA_W'($urandom_range(2 * hmax) - hmax);
      h[p].im = DATA_W'($urandom_range(2 * hmax) - hmax);
    end
  endtask

  initial begin
    for (int p = 0; p < NPOINT; p++) begin x[p] = '0; h[p] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. exact mode, small filter, with bubbles
    set_filter(8);
    run_blocks(400, 30, 8, 0);
    // 2. exact mode, large filter, back to back: saturation
    set_filter(31);
    h[0].re = -32; h[0].im = -32;
    run_blocks(400, 0, 31, 0);
    // 4. probabilistic mode
    set_filter(31);
    noise_en = 1; n_mode_sw++;
    run_blocks(2000, 5, 31, 1);
    // 3. exact mode again
    noise_en = 0; n_mode_sw++;
    run_blocks(200, 10, 31, 0);

    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d blocks never came out", q.size()); end
    $display("mechanisms: bubbles=%0d back_to_back=%0d saturated_blocks=%0d noisy_blocks_in_error=%0d mode_switches=%0d",
             n_bubble, n_b2b, n_sat, n_noisy_err, n_mode_sw);
    if (err_pow > 0.0)
      $display("probabilistic mode output SNR = %0.1f dB", 10.0 * $log10(sig_pow / err_pow));
    checks += 5;
    if (n_bubble == 0)    begin failures++; $display("FAIL no bubble"); end
    if (n_b2b == 0)       begin failures++; $display("FAIL no back-to-back block"); end
    if (n_sat == 0)       begin failures++; $display("FAIL no saturation"); end
    if (n_noisy_err == 0) begin failures++; $display("FAIL noise never changed an output"); end
    if (n_mode_sw < 2)    begin failures++; $display("FAIL no mode switch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
