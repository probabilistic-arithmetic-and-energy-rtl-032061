// tb_fft4 - checks the 4-point FFT primitive against a direct DFT computed
// with integers, X[k] = sum_n x[n] (-j)^(nk).
//  * random blocks (and the extreme values) with no noise must match exactly;
//  * a noise event on the sum node of a stage-2 adder must invert exactly
//    that bit of the corresponding output;
//  * a noise event on a stage-1 adder (a0.re) must shift both outputs that
//    use it, X0.re and X2.re, by the same error, leaving the others exact.
module tb_fft4;
  import pcmos_pkg::*;
  csample_t x [NPOINT];
  cspec_t   X [NPOINT];
  logic [15:0][DATA_W+1:0] fs, fc;
  int checks = 0, failures = 0;
  int er [NPOINT], ei [NPOINT];

  fft4 dut (.x, .flip_s(fs), .flip_c(fc), .X);

  // reference DFT
  task automatic dft();
    int xr [NPOINT], xi [NPOINT];
    for (int n = 0; n < NPOINT; n++) begin xr[n] = int'(x[n].re); xi[n] = int'(x[n].im); end
    for (int k = 0; k < NPOINT; k++) begin
      er[k] = 0; ei[k] = 0;
      for (int n = 0; n < NPOINT; n++) begin
        case ((n * k) % 4)             // multiply by (-j)^(nk)
          0: begin er[k] += xr[n]; ei[k] += xi[n]; end
          1: begin er[k] += xi[n]; ei[k] -= xr[n]; end
          2: begin er[k] -= xr[n]; ei[k] -= xi[n]; end
          default: begin er[k] -= xi[n]; ei[k] += xr[n]; end
        endcase
      end
    end
  endtask

  function automatic logic [7:0] b8(int v);
    return 8'(v);
  endfunction

  task automatic compare(string what, int skip = -1);
    for (int k = 0; k < NPOINT; k++) begin
      if (k == skip) continue;
      checks++;
      if (X[k].re != b8(er[k]) || X[k].im != b8(ei[k])) begin
        failures++;
        if (failures < 10)
          $display("FAIL %s X[%0d] = (%0d,%0d) expected (%0d,%0d)", what, k, X[k].re, X[k].im, er[k], ei[k]);
      end
    end
  endtask

  initial begin
    fs = '0; fc = '0;
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < NPOINT; i++) begin
        x[i].re = DATA_W'($urandom);
        x[i].im = DATA_W'($urandom);
        if (n == 0) begin x[i].re = -32; x[i].im = -32; end
        if (n == 1) begin x[i].re = (i % 2 != 0) ? -32 : 31; x[i].im = (i % 2 != 0) ? 31 : -32; end
      end
      fs = '0; fc = '0; #1;
      dft();
      compare("exact");
      // stage-2 sum-node noise
      begin
        int k, j, pt;
        logic [7:0] got, exp_v;
        k = $urandom_range(7); j = $urandom_range(7);
        fs[8 + k] = 8'(1) << j; #1;
        pt = (k < 2) ? 0 : (k < 4) ? 2 : (k < 6) ? 1 : 3;
        got   = (k % 2 != 0) ? X[pt].im : X[pt].re;
        exp_v = ((k % 2 != 0) ? b8(ei[pt]) : b8(er[pt])) ^ (8'(1) << j);
        checks++;
        if (got != exp_v) begin
          failures++;
          $display("FAIL stage-2 flip k=%0d bit %0d: %0d vs %0d", k, j, got, exp_v);
        end
        if (k < 2) compare("stage-2 flip others", 0);
        fs = '0;
      end
      // stage-1 sum-node noise on a0.re
      begin
        int j;
        logic [7:0] d0, d2;
        j = $urandom_range(7);
        fs[0] = 8'(1) << j; #1;
        d0 = X[0].re - b8(er[0]);
        d2 = X[2].re - b8(er[2]);
        checks++;
        if (d0 == 0 || d0 != d2 || X[0].im != b8(ei[0]) || X[1] != {b8(er[1]), b8(ei[1])}) begin
          failures++;
          $display("FAIL stage-1 flip bit %0d: d0=%0d d2=%0d", j, d0, d2);
        end
        fs = '0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
