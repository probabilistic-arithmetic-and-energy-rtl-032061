// pcmos_fa - one full adder of a probabilistic (PCMOS) ripple-carry adder.
//
// Computes s = a ^ b ^ ci and co = majority(a, b, ci), like any full adder.
// Each of its two outputs has a noise coupling point: when flip_s (flip_c) is
// high the sum (carry) leaves the cell inverted. In silicon that inversion is
// what thermal noise on a low-voltage node does with some probability; here
// the noise model that drives flip_s/flip_c decides when it happens. Coupling
// the noise at the sum and carry nodes follows the characterisation setup of
// the design; all gates of one cell share one supply domain, so one cell has
// one error probability per output. Purely combinational.
module pcmos_fa (
  input  logic a,
  input  logic b,
  input  logic ci,
  input  logic flip_s,   // noise event on the sum node
  input  logic flip_c,   // noise event on the carry-out node
  output logic s,
  output logic co
);
  logic p, g;
  always_comb begin
    p  = a ^ b;
    g  = a & b;
    s  = (p ^ ci) ^ flip_s;
    co = (g | (p & ci)) ^ flip_c;
  end
endmodule
