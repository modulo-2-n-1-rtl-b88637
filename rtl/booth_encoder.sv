// booth_encoder: modified Booth (2-bit recoding) encoder.
//
// Looks at three overlapping multiplier bits b3 = {b[2i+1], b[2i], b[2i-1]}
// and encodes the digit d = -2*b[2i+1] + b[2i] + b[2i-1], in {-2..2}, as
//   one = |d| == 1,  two = |d| == 2,  neg = d < 0 (or the -0 code 111).
// In the modulo 2^n-1 multiplier the lowest encoder takes b[n-1] in place of
// b[-1] (2^n = 1 there). The one/two/neg signal set is this design's choice.
// Purely combinational.
module booth_encoder (
  input  logic [2:0] b3,
  output logic       one,
  output logic       two,
  output logic       neg
);

  assign one = b3[1] ^ b3[0];
  assign two = (b3[2] & ~b3[1] & ~b3[0]) | (~b3[2] & b3[1] & b3[0]);
  assign neg = b3[2];

endmodule
