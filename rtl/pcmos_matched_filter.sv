// pcmos_matched_filter - probabilistic DSP co-processor: a 4-point matched
// filter computed as FFT -> multiply by the filter spectrum -> inverse FFT,
// with every adder and multiplier a probabilistic (PCMOS) one.
//
// A host processor hands over one block of four complex 6-bit samples x and
// keeps the filter's frequency response h (four complex 6-bit coefficients in
// Q1.5, i.e. value/32) on the h input. The pipeline is:
//   stage 1  X = FFT4(x)                                  (fft4, 8-bit out)
//   stage 2  Y[k] = (X[k] >>> 2) * h[k], per point one complex multiply of
//            four array_mult products and two 13-bit bivos_rca adders;
//            Y is rescaled by >>> 5 and saturated to 6 bits (sat_o reports it)
//   stage 3  y = IFFT4(Y), done on the same fft4 datapath by swapping the real
//            and imaginary parts at its input and output; the 1/4 of the
//            inverse transform is left out, so y is 4x the exact inverse.
// Each stage ends in a register: a block accepted with in_valid at clock edge t
// leaves with out_valid after edge t+3, and a new block may enter every cycle.
//
// Noise: each arithmetic block has its own noise_source following PROFILE
// (default: binned BIVOS supply voltages). The noise is applied as bit errors
// on the output bits of every adder and multiplier, bit i of a block output
// being wrong with probability 1 - p_i, which is how the design's FFT-level
// error study injected it; the carry nodes are left clean here because p_i
// already describes the block's output bits. noise_en low turns every source off,
// so the same hardware then computes the exact (deterministic) result; high
// makes it probabilistic. The FFT/multiply/IFFT structure and the use of BIVOS
// adders and multipliers in every unit follow the design; the block size, the
// scaling between stages, saturation and the handshake are this design's.
module pcmos_matched_filter
  import pcmos_pkg::*;
#(
  parameter profile_e PROFILE = PROF_BIVOS
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     noise_en,          // 1: probabilistic mode, 0: exact mode
  input  logic     in_valid,
  input  csample_t x_i   [NPOINT],    // time-domain block from the host
  input  csample_t h_i   [NPOINT],    // filter spectrum, Q1.5
  output logic     out_valid,
  output cspec_t   y_o   [NPOINT],    // filtered block (times 4)
  output logic     sat_o              // a product saturated in this block
);
  localparam int unsigned SW = DATA_W + 2;        // spectrum width, 8
  localparam int unsigned PW = 2 * DATA_W;        // product width, 12
  localparam int unsigned YW = PW + 1;            // complex product width, 13

  // ---------------------------------------------------------------- noise
  logic [15:0][SW-1:0]        nz_fwd, nz_inv;     // one vector per FFT adder
  logic [4*NPOINT-1:0][PW-1:0] nz_mul;
  logic [2*NPOINT-1:0][YW-1:0] nz_add;            // one vector per product adder

  noise_source #(.WIDTH(SW), .LANES(16), .PROFILE(PROFILE), .SEED(32'h0BAD_5EED))
    u_nz_fwd (.clk, .rst_n, .en(noise_en), .flips(nz_fwd));
  noise_source #(.WIDTH(PW), .LANES(4*NPOINT), .PROFILE(PROFILE), .SEED(32'h7F4A_7C15))
    u_nz_mul (.clk, .rst_n, .en(noise_en), .flips(nz_mul));
  noise_source #(.WIDTH(YW), .LANES(2*NPOINT), .PROFILE(PROFILE), .SEED(32'h2545_F491))
    u_nz_add (.clk, .rst_n, .en(noise_en), .flips(nz_add));
  noise_source #(.WIDTH(SW), .LANES(16), .PROFILE(PROFILE), .SEED(32'h9E37_79B9))
    u_nz_inv (.clk, .rst_n, .en(noise_en), .flips(nz_inv));

  // ---------------------------------------------------------------- stage 1
  cspec_t X [NPOINT];
  cspec_t s1_q [NPOINT];
  logic   s1_v;

  fft4 u_fft (
    .x      (x_i),
    .flip_s (nz_fwd),
    .flip_c ('0),
    .X      (X)
  );

  // ---------------------------------------------------------------- stage 2
  sample_t       xs_re [NPOINT], xs_im [NPOINT];
  logic [PW-1:0] prod  [NPOINT][4];               // rr, ii, ri, ir
  logic [YW-1:0] y_re  [NPOINT], y_im [NPOINT];
  csample_t      ys    [NPOINT];
  logic [NPOINT-1:0] ysat;
  csample_t      s2_q  [NPOINT];
  logic          s2_v, s2_sat;

  function automatic logic [YW-1:0] sx13(logic [PW-1:0] v);
    return {v[PW-1], v};
  endfunction

  // Arithmetic shift by 5 and saturation to a 6-bit sample.
  function automatic sample_t rescale(logic [YW-1:0] v, output logic sat);
    logic signed [YW-1:0] t;
    t = signed'(v) >>> 5;
    if (t > 31)       begin sat = 1'b1; return 6'sd31;  end
    else if (t < -32) begin sat = 1'b1; return -6'sd32; end
    else              begin sat = 1'b0; return t[DATA_W-1:0]; end
  endfunction

  for (genvar k = 0; k < NPOINT; k++) begin : g_cmul
    logic unused_c_re, unused_c_im;
    assign xs_re[k] = s1_q[k].re[SW-1:2];
    assign xs_im[k] = s1_q[k].im[SW-1:2];

    array_mult #(.N(DATA_W)) u_rr (.a(xs_re[k]), .b(h_i[k].re), .flip_p(nz_mul[4*k+0]), .p(prod[k][0]));
    array_mult #(.N(DATA_W)) u_ii (.a(xs_im[k]), .b(h_i[k].im), .flip_p(nz_mul[4*k+1]), .p(prod[k][1]));
    array_mult #(.N(DATA_W)) u_ri (.a(xs_re[k]), .b(h_i[k].im), .flip_p(nz_mul[4*k+2]), .p(prod[k][2]));
    array_mult #(.N(DATA_W)) u_ir (.a(xs_im[k]), .b(h_i[k].re), .flip_p(nz_mul[4*k+3]), .p(prod[k][3]));

    // real part: rr - ii ; imaginary part: ri + ir
    bivos_rca #(.WIDTH(YW)) u_re (
      .a(sx13(prod[k][0])), .b(~sx13(prod[k][1])), .cin(1'b1),
      .flip_s(nz_add[2*k]), .flip_c('0),
      .sum(y_re[k]), .cout(unused_c_re));
    bivos_rca #(.WIDTH(YW)) u_im (
      .a(sx13(prod[k][2])), .b(sx13(prod[k][3])), .cin(1'b0),
      .flip_s(nz_add[2*k+1]), .flip_c('0),
      .sum(y_im[k]), .cout(unused_c_im));

    always_comb begin
      logic sr, si;
      ys[k].re = rescale(y_re[k], sr);
      ys[k].im = rescale(y_im[k], si);
      ysat[k]  = sr | si;
    end
  end

  // ---------------------------------------------------------------- stage 3
  csample_t inv_in  [NPOINT];
  cspec_t   inv_out [NPOINT];

  always_comb begin
    for (int unsigned k = 0; k < NPOINT; k++) begin
      inv_in[k].re = s2_q[k].im;
      inv_in[k].im = s2_q[k].re;
    end
  end

  fft4 u_ifft (
    .x      (inv_in),
    .flip_s (nz_inv),
    .flip_c ('0),
    .X      (inv_out)
  );

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v      <= 1'b0;
      s2_v      <= 1'b0;
      s2_sat    <= 1'b0;
      out_valid <= 1'b0;
      sat_o     <= 1'b0;
      for (int unsigned k = 0; k < NPOINT; k++) begin
        s1_q[k] <= '0;
        s2_q[k] <= '0;
        y_o[k]  <= '0;
      end
    end else begin
      s1_v      <= in_valid;
      s2_v      <= s1_v;
      out_valid <= s2_v;
      s2_sat    <= s1_v & (|ysat);
      sat_o     <= s2_v & s2_sat;
      for (int unsigned k = 0; k < NPOINT; k++) begin
        if (in_valid) s1_q[k] <= X[k];
        if (s1_v)     s2_q[k] <= ys[k];
        if (s2_v) begin
          y_o[k].re <= inv_out[k].im;
          y_o[k].im <= inv_out[k].re;
        end
      end
    end
  end
  // Handshake rules: a saturation flag only accompanies a result, and a
  // result needs a block that entered three cycles earlier. The checks are
  // off during reset (the lint tool notes rst_n as used both ways here).
  a_sat_with_result: assert property (@(posedge clk) disable iff (!rst_n) sat_o |-> out_valid);
  a_result_has_input: assert property (@(posedge clk) disable iff (!rst_n)
                                       out_valid |-> $past(in_valid, 3));
endmodule
