// pcmos_pkg - shared types and error-probability profiles of the probabilistic
// (PCMOS) arithmetic blocks.
//
// In a PCMOS circuit every output bit i is correct only with probability p_i.
// Biased voltage scaling (BIVOS) gives the bits of higher significance a higher
// supply voltage and so a higher p_i; conventional voltage scaling gives every
// bit the same p. The logic here never sees a voltage: a profile turns a bit
// position into a flip threshold, the chance (1 - p_i) scaled to 2^16, which
// the noise model compares against a 16-bit random number every cycle.
//
// Profiles:
//   PROF_EXACT     p_i = 1 everywhere (deterministic reference).
//   PROF_BIVOS     binned BIVOS. For a 32-bit word the bins are the published
//                  example: bits 31..20 p=1, 19..16 p=0.95, 15..8 p=0.90,
//                  7..0 p=0.80. Other widths keep the same proportions of the
//                  word (12/32, 4/32, 8/32, 8/32, counted from the MSB); this
//                  scaling to other widths is a choice of this design.
//   PROF_UNIFORM   conventional scaling, p=0.95 on every bit (comparison only).
//   PROF_GEOMETRIC per-bit supplies with p_0 given and p_i = p_(i-1) + a*r^(i-1),
//                  clamped at 1.
package pcmos_pkg;

  typedef enum logic [1:0] {
    PROF_EXACT     = 2'd0,
    PROF_BIVOS     = 2'd1,
    PROF_UNIFORM   = 2'd2,
    PROF_GEOMETRIC = 2'd3
  } profile_e;

  // Sample width of the FFT primitive and of the multiplier operands.
  localparam int unsigned DATA_W = 6;
  // Points of the FFT primitive.
  localparam int unsigned NPOINT = 4;

  typedef logic signed [DATA_W-1:0]   sample_t;
  typedef logic signed [DATA_W+1:0]   spec_t;     // 4-point FFT output, 2 bits of growth

  typedef struct packed {
    sample_t re;
    sample_t im;
  } csample_t;

  typedef struct packed {
    spec_t re;
    spec_t im;
  } cspec_t;

  // Probability of correctness (real) of bit `bit_i` of a `width`-bit word.
  function automatic real bit_probability(profile_e prof, int unsigned width,
                                          int unsigned bit_i, real p0, real a, real r);
    real p;
    int unsigned from_msb;
    from_msb = width - 1 - bit_i;
    case (prof)
      PROF_EXACT:   p = 1.0;
      PROF_UNIFORM: p = 0.95;
      PROF_BIVOS: begin
        // Bin edges as fractions of the word, counted from the MSB side:
        // first 12/32 at p=1, next 4/32 at 0.95, next 8/32 at 0.90, rest 0.80.
        if (32 * from_msb < 12 * width)      p = 1.0;
        else if (32 * from_msb < 16 * width) p = 0.95;
        else if (32 * from_msb < 24 * width) p = 0.90;
        else                                 p = 0.80;
      end
      default: begin
        p = p0;
        for (int unsigned k = 1; k <= bit_i; k++) p = p + a * (r ** (k - 1));
        if (p > 1.0) p = 1.0;
      end
    endcase
    return p;
  endfunction

  // Flip threshold of that bit, (1 - p) * 2^16 rounded, 0 when p = 1.
  function automatic int unsigned flip_threshold(profile_e prof, int unsigned width,
                                                 int unsigned bit_i, real p0, real a, real r);
    real q;
    q = (1.0 - bit_probability(prof, width, bit_i, p0, a, r)) * 65536.0;
    if (q < 0.0) q = 0.0;
    return int'(q);
  endfunction

endpackage
