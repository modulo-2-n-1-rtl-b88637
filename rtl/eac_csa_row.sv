// eac_csa_row: carry-save row of n full adders with end-around carry.
//
// Adds three n-bit vectors modulo 2^n-1 into two: s is the bitwise sum and c
// the carries moved one place up, with the carry out of bit n-1 (weight
// 2^n = 1) wrapped round to bit 0, so x + y + z = s + c modulo 2^n-1. The
// wrap of the top carry follows the published multiplier's wiring. Purely
// combinational.
module eac_csa_row #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] z,
  output logic [N-1:0] s,
  output logic [N-1:0] c
);

  logic [N-1:0] cr;  // carry of bit i, weight 2^(i+1)

  assign s  = x ^ y ^ z;
  assign cr = (x & y) | (x & z) | (y & z);
  assign c  = {cr[N-2:0], cr[N-1]};

endmodule
