// noise_source - behavioural model of the thermal noise that makes PCMOS
// logic probabilistic. It is not a circuit of the design: in silicon the noise
// is physical, and this model stands in for it so that the arithmetic blocks
// can be simulated (and emulated) with the error rates their supply voltages
// would give.
//
// It drives LANES copies of a WIDTH-bit flip vector. Every (lane, bit) has its
// own 32-bit xorshift generator; each clock the low 16 bits of that generator
// are compared with the flip threshold of the bit's position, (1 - p_i) * 2^16,
// taken from the chosen error profile (pcmos_pkg). A bit therefore flips with
// probability 1 - p_i, independently of all other bits and cycles, which is
// how the design's own simulations injected noise and bit errors. Bit position
// i means the weight 2^i in the word the flips are applied to, so the BIVOS
// profile makes high bits flip less often than low ones.
//
// Timing: flips is registered. A new draw appears after every rising edge;
// after an edge at which en was low, and during reset, it is all zero.
// Generators restart from seeds derived from SEED on reset, so a run is
// repeatable. An assertion checks the quiet output in deterministic mode.
module noise_source #(
  parameter int unsigned          WIDTH   = 12,
  parameter int unsigned          LANES   = 1,
  parameter pcmos_pkg::profile_e  PROFILE = pcmos_pkg::PROF_BIVOS,
  parameter real                  P0      = 0.80,  // geometric profile only
  parameter real                  A       = 0.01,  // geometric profile only
  parameter real                  R       = 2.0,   // geometric profile only
  parameter int unsigned          SEED    = 32'h1234_5678
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              en,     // 0: deterministic mode, no flips
  output logic [LANES-1:0][WIDTH-1:0]       flips
);
  typedef int unsigned thr_t [WIDTH];

  function automatic thr_t make_thresholds();
    thr_t t;
    for (int unsigned i = 0; i < WIDTH; i++)
      t[i] = pcmos_pkg::flip_threshold(PROFILE, WIDTH, i, P0, A, R);
    return t;
  endfunction

  localparam thr_t THR = make_thresholds();

  typedef logic [15:0] thr16_t [WIDTH];
  function automatic thr16_t minus_one(thr_t t);
    thr16_t m;
    for (int unsigned i = 0; i < WIDTH; i++) m[i] = (t[i] == 0) ? 16'd0 : 16'(t[i] - 1);
    return m;
  endfunction
  localparam thr16_t THR_M1 = minus_one(THR);

  function automatic logic [31:0] xorshift32(logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  function automatic logic [31:0] seed_of(int unsigned lane, int unsigned bit_i);
    logic [31:0] h;
    h = SEED ^ ((lane * WIDTH + bit_i + 1) * 32'h9E37_79B9);
    h = xorshift32(h | 32'h1);
    return (h == 32'h0) ? 32'h1 : h;
  endfunction

  logic [31:0] state [LANES][WIDTH];

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          state[l][i] <= seed_of(l, i);
          flips[l][i] <= 1'b0;
        end else begin
          state[l][i] <= xorshift32(state[l][i]);
          // flip when the 16-bit draw is below the threshold; a bit whose
          // p_i is 1 has threshold 0 and never flips
          flips[l][i] <= en && (THR[i] != 0) && (state[l][i][15:0] <= THR_M1[i]);
        end
      end
    end
  end
  // Deterministic mode: one cycle after en was low, no bit may flip.
  a_quiet_when_disabled: assert property (@(posedge clk) disable iff (!rst_n)
                                          !en |=> (flips == '0));
endmodule
