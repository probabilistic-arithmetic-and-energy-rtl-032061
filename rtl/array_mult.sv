// array_mult - N-bit two's complement array multiplier with probabilistic
// (PCMOS) output bits.
//
// The product of two signed N-bit operands is formed Baugh-Wooley style: the
// N*N partial-product bits a[j]&b[i] are laid out as an array, the bits in
// which exactly one operand bit is a sign bit are inverted, and the constants
// 2^N and 2^(2N-1) are added, so that only additions remain. Row i of the
// array (partial products of b[i], shifted by i) is added to the running sum
// by a row of full adders (a bivos_rca), N-1 rows in all, which is the
// ripple-row array organisation. The 2N product bits then pass through
// their noise coupling points: product bit k is inverted when flip_p[k] is
// high, which is how bit errors at a block output are injected at the rate
// of that output bit's supply domain.
//
// The 6-bit operand width is the design's; the internal organisation of its
// three-section array multiplier is not specified, so this simple ripple-row
// Baugh-Wooley array is this design's choice. Combinational.
module array_mult #(
  parameter int unsigned N = 6
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  input  logic        [2*N-1:0] flip_p,   // noise events on the product bits
  output logic signed [2*N-1:0] p
);
  localparam int unsigned PW = 2 * N;

  // Partial-product rows, already shifted into place.
  logic [PW-1:0] row [N];
  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      row[i] = '0;
      for (int unsigned j = 0; j < N; j++) begin
        // invert where exactly one of the two bits is a sign bit
        row[i][i+j] = (a[j] & b[i]) ^ ((i == N-1) != (j == N-1));
      end
    end
    // Baugh-Wooley correction constants
    row[0][N]    = 1'b1;
    row[0][PW-1] = 1'b1;
  end

  // Running sums: acc[i] = row[0] + ... + row[i].
  logic [PW-1:0] acc [N];
  assign acc[0] = row[0];

  for (genvar i = 1; i < N; i++) begin : g_row
    logic unused_cout;
    bivos_rca #(.WIDTH(PW)) u_row (
      .a      (acc[i-1]),
      .b      (row[i]),
      .cin    (1'b0),
      .flip_s ('0),
      .flip_c ('0),
      .sum    (acc[i]),
      .cout   (unused_cout)
    );
  end

  assign p = acc[N-1] ^ flip_p;
endmodule
