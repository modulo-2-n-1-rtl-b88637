// modp1_sub_dim1: modulo 2^n+1 subtractor for diminished-one operands.
//
// Operands arrive as A* = A - 1, B* = B - 1 (n bits each) with zero flags
// A_z, B_z; the result is D* = D - 1 with zero flag D_z, D = |A - B| mod
// (2^n+1). Since A - B - 1 = A* - B* - 1 = A* + ~B* - 2^n and -2^n = 1, the
// nonzero-operand case is D* = |A* + ~B* + 1|, which is exactly what the n-bit
// IEAC adder (a parallel-prefix adder: Kogge-Stone or Brent-Kung, chosen by
// ADDER) computes. A multiplexer then handles zero operands:
//   A_z & B_z  -> 0..00 (D = 0)
//   B_z        -> A*          (D = A)
//   A_z        -> ~B*         (D = -B, and -B - 1 = ~B*)
//   otherwise  -> adder sum
// and the zero-handling unit sets D_z from A_z, B_z and the adder's
// all-propagate signal. Adder, multiplexer inputs and zero-handling unit
// follow the published block diagram; the selection rules are derived. The
// B* port takes B* itself and the complement is formed here.
//
// Interface and timing: purely combinational, no clock. D* is meaningless
// when D_z = 1 (it is 0..00 when both operands are zero).
module modp1_sub_dim1
  import modarith_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter adder_e      ADDER = ADD_KSA
) (
  input  logic [N-1:0] a_dim,
  input  logic         a_z,
  input  logic [N-1:0] b_dim,
  input  logic         b_z,
  output logic [N-1:0] d_dim,
  output logic         d_z
);

  logic [N-1:0] b_inv;
  logic [N-1:0] s_add;
  logic         all_p;

  assign b_inv = ~b_dim;

  ieac_adder #(.N(N), .ADDER(ADDER)) u_ieac (
    .x  (a_dim),
    .z  (b_inv),
    .s  (s_add),
    .msb(all_p)
  );

  always_comb begin
    unique case ({a_z, b_z})
      2'b11:   d_dim = '0;
      2'b01:   d_dim = a_dim;
      2'b10:   d_dim = b_inv;
      default: d_dim = s_add;
    endcase
  end

  zero_handling u_zero (
    .a_z  (a_z),
    .b_z  (b_z),
    .all_p(all_p),
    .d_z  (d_z)
  );

endmodule
