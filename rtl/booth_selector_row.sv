// booth_selector_row: one row of Booth selectors for a modulo 2^n-1 product.
//
// Forms the partial product |d * 4^ROW * A| mod (2^n-1) for the digit d given
// by one/two/neg. Multiplying by 4^ROW modulo 2^n-1 is a left rotation of A
// by 2*ROW bits, so row ROW sees the multiplicand bits in rotated order; a
// digit of 2 rotates one more bit, and a negative digit complements the row,
// since -X = ~X modulo 2^n-1. Selector bit j is
//   pp[j] = ((one & ar[j]) | (two & ar[j-1 mod n])) ^ neg,  ar = A rotl 2*ROW.
// The rotated bit order follows the multiplier's published wiring; the
// complement rule is derived. Purely combinational.
module booth_selector_row #(
  parameter int unsigned N   = 8,
  parameter int unsigned ROW = 0
) (
  input  logic [N-1:0] a,
  input  logic         one,
  input  logic         two,
  input  logic         neg,
  output logic [N-1:0] pp
);

  localparam int unsigned ROT = (2 * ROW) % N;

  logic [N-1:0] ar;

  always_comb begin
    for (int j = 0; j < N; j++) ar[j] = a[(j + N - ROT) % N];
    for (int j = 0; j < N; j++)
      pp[j] = ((one & ar[j]) | (two & ar[(j + N - 1) % N])) ^ neg;
  end

endmodule
