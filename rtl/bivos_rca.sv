// bivos_rca - WIDTH-bit ripple-carry adder built from PCMOS full adders, the
// arithmetic element of biased voltage scaling (BIVOS).
//
// Bit i is computed by full adder i, whose carry ripples into bit i+1. In the
// physical design each full adder (or each bin of neighbouring full adders)
// sits on its own supply rail, higher for more significant bits, with an
// inverter pair on the carry between rails. Logically those inverter pairs are
// wires, so they do not appear here; the only logical trace of the rails is the
// per-bit error probability, which enters through flip_s[i] and flip_c[i] from
// a noise model (see noise_source). With all flips low this is an exact adder:
// {cout, sum} = a + b + cin.
//
// The default width, 12 bits, is the adder the design characterises; wider
// words (32 bits in the bit-significance example) are a parameter override.
// Purely combinational: the result is valid one ripple delay after the inputs.
module bivos_rca #(
  parameter int unsigned WIDTH = 12
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic [WIDTH-1:0] flip_s,  // per-bit noise events on sum nodes
  input  logic [WIDTH-1:0] flip_c,  // per-bit noise events on carry nodes
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    pcmos_fa u_fa (
      .a      (a[i]),
      .b      (b[i]),
      .ci     (c[i]),
      .flip_s (flip_s[i]),
      .flip_c (flip_c[i]),
      .s      (sum[i]),
      .co     (c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
