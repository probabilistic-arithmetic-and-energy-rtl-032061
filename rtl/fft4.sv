// fft4 - 4-point FFT primitive on complex 6-bit samples, built only from
// probabilistic ripple-carry adders.
//
// Radix-2 decimation in time, two stages of butterflies:
//   stage 1: a0 = x0 + x2, a1 = x0 - x2, a2 = x1 + x3, a3 = x1 - x3
//   stage 2: X0 = a0 + a2, X2 = a0 - a2,
//            X1 = a1 + (-j) a3, X3 = a1 - (-j) a3
// The only twiddle factor besides 1 is -j, which is a swap of real and
// imaginary parts and a change of sign, so it is folded into the choice of
// adding or subtracting; the primitive needs 16 real adders and no
// multiplier. A subtraction is an addition of the inverted operand with the
// carry-in set. Every adder is an 8-bit bivos_rca (two bits of growth over the
// 6-bit input, so no result can overflow when the flips are low).
//
// Noise: adder k receives flip_s[k] and flip_c[k] on its sum and carry nodes.
// Adder numbering: stage 1 k = 0..7 as (a0.re, a0.im, a1.re, a1.im, a2.re,
// a2.im, a3.re, a3.im); stage 2 k = 8..15 as (X0.re, X0.im, X2.re, X2.im,
// X1.re, X1.im, X3.re, X3.im). Noise raised in stage 1 propagates into stage 2,
// as in the design's own error-propagation study. Outputs are not scaled:
// X = DFT(x) exactly when all flips are low. Combinational.
module fft4
  import pcmos_pkg::*;
(
  input  csample_t                x     [NPOINT],
  input  logic [15:0][DATA_W+1:0] flip_s,
  input  logic [15:0][DATA_W+1:0] flip_c,
  output cspec_t                  X     [NPOINT]
);
  localparam int unsigned W = DATA_W + 2;

  // Operands and results of the 8 adders of each stage.
  logic [W-1:0] a1 [8], b1 [8], r1 [8];
  logic         sub1 [8];
  logic [W-1:0] a2 [8], b2 [8], r2 [8];
  logic         sub2 [8];

  for (genvar k = 0; k < 8; k++) begin : g_add
    logic unused_cout1, unused_cout2;
    bivos_rca #(.WIDTH(W)) u_stage1 (
      .a      (a1[k]),
      .b      (sub1[k] ? ~b1[k] : b1[k]),
      .cin    (sub1[k]),
      .flip_s (flip_s[k]),
      .flip_c (flip_c[k]),
      .sum    (r1[k]),
      .cout   (unused_cout1)
    );
    bivos_rca #(.WIDTH(W)) u_stage2 (
      .a      (a2[k]),
      .b      (sub2[k] ? ~b2[k] : b2[k]),
      .cin    (sub2[k]),
      .flip_s (flip_s[8+k]),
      .flip_c (flip_c[8+k]),
      .sum    (r2[k]),
      .cout   (unused_cout2)
    );
  end

  function automatic logic [W-1:0] sx(sample_t v);
    return {{2{v[DATA_W-1]}}, v};
  endfunction

  always_comb begin
    // stage 1: a0 = x0 + x2 (k 0,1), a1 = x0 - x2 (k 2,3),
    //          a2 = x1 + x3 (k 4,5), a3 = x1 - x3 (k 6,7)
    for (int unsigned h = 0; h < 2; h++) begin
      a1[4*h+0] = sx(x[h].re);  b1[4*h+0] = sx(x[h+2].re);  sub1[4*h+0] = 1'b0;
      a1[4*h+1] = sx(x[h].im);  b1[4*h+1] = sx(x[h+2].im);  sub1[4*h+1] = 1'b0;
      a1[4*h+2] = sx(x[h].re);  b1[4*h+2] = sx(x[h+2].re);  sub1[4*h+2] = 1'b1;
      a1[4*h+3] = sx(x[h].im);  b1[4*h+3] = sx(x[h+2].im);  sub1[4*h+3] = 1'b1;
    end
  end

  always_comb begin
    // stage 2 (a0 = r1 0/1, a1 = r1 2/3, a2 = r1 4/5, a3 = r1 6/7)
    a2[0] = r1[0]; b2[0] = r1[4]; sub2[0] = 1'b0;   // X0.re = a0.re + a2.re
    a2[1] = r1[1]; b2[1] = r1[5]; sub2[1] = 1'b0;   // X0.im = a0.im + a2.im
    a2[2] = r1[0]; b2[2] = r1[4]; sub2[2] = 1'b1;   // X2.re = a0.re - a2.re
    a2[3] = r1[1]; b2[3] = r1[5]; sub2[3] = 1'b1;   // X2.im = a0.im - a2.im
    a2[4] = r1[2]; b2[4] = r1[7]; sub2[4] = 1'b0;   // X1.re = a1.re + a3.im
    a2[5] = r1[3]; b2[5] = r1[6]; sub2[5] = 1'b1;   // X1.im = a1.im - a3.re
    a2[6] = r1[2]; b2[6] = r1[7]; sub2[6] = 1'b1;   // X3.re = a1.re - a3.im
    a2[7] = r1[3]; b2[7] = r1[6]; sub2[7] = 1'b0;   // X3.im = a1.im + a3.re
  end

  always_comb begin
    X[0].re = r2[0];  X[0].im = r2[1];
    X[2].re = r2[2];  X[2].im = r2[3];
    X[1].re = r2[4];  X[1].im = r2[5];
    X[3].re = r2[6];  X[3].im = r2[7];
  end
endmodule
