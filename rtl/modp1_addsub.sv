// modp1_addsub: combined modulo 2^n+1 adder/subtractor, normal representation.
//
// Operands A and B are (n+1)-bit numbers in [0, 2^n]; m = 0 gives
// D = |A + B| mod (2^n+1), m = 1 gives D = |A - B| mod (2^n+1), D in [0, 2^n].
// Subtraction uses |A - B| = |A + ~B + 3| with ~B the (n+1)-bit complement, so
// both operations become the sum of A and Y = B xor {m} plus a constant.
//
// How it works. Because 2^n = -1 mod 2^n+1, the top bits a_n, y_n are
// folded into a correction vector W, and one row of full adders (carry-save)
// reduces A_low, Y_low and W to a sum vector S and a carry vector C. The
// carry out of bit n-1 has weight 2^n = -1, so it re-enters bit 0 inverted.
// The n-bit IEAC adder then adds S and the shifted carries plus one, and its
// MSB output marks complementary inputs (result 2^n). W is chosen so that the
// total is exact:
//   add:      W = 2^n - 1 - (a_n + b_n)   (bits n-1..2 are 1)
//   subtract: W = 1 - a_n - ~b_n          (bits n-1..1 are 0)
// Bits n-1..2 of W are therefore just ~m, and bits 1:0 (the "cells" at the
// two low positions) depend on m, a_n and b_n. In the one subtract case where
// W would be -1, A = 2^n and B < 2^n, a gate on m & a_n & ~b_n clears every
// carry entering the IEAC adder (W is 0 there too), which then returns
// ~B_low + 1 = 2^n - B. The row structure, the mode XOR, the special-case
// gate and the IEAC adder follow the published architecture; the values of W
// and the gate's exact function are derived here. The IEAC adder's carry
// network is chosen by ADDER (ripple carry or carry look-ahead in the two
// drawn versions; the prefix adders are also allowed).
//
// Interface and timing: purely combinational, no clock. Inputs above 2^n are
// outside the representation and give an unspecified result.
module modp1_addsub
  import modarith_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter adder_e      ADDER = ADD_RCA
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  input  logic       m,
  output logic [N:0] d
);

  logic [N:0]   y;        // B or its (n+1)-bit complement
  logic [N-1:0] w;        // correction vector
  logic [N-1:0] s_row;    // carry-save sum
  logic [N-1:0] c_row;    // carry-save carries, c_row[i] has weight 2^(i+1)
  logic [N-1:0] z;        // carries shifted up, top carry inverted into bit 0
  logic         special;  // subtract with A = 2^n, B < 2^n
  logic [N-1:0] s_add;
  logic         msb_add;

  assign y       = b ^ {(N+1){m}};
  assign special = m & a[N] & ~b[N];

  always_comb begin
    w    = '0;
    w[0] = m ? (~a[N] & b[N]) : ~(a[N] ^ b[N]);
    w[1] = ~m & ~(a[N] & b[N]);
    for (int i = 2; i < N; i++) w[i] = ~m;
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      s_row[i] = a[i] ^ y[i] ^ w[i];
      c_row[i] = (a[i] & y[i]) | (a[i] & w[i]) | (y[i] & w[i]);
    end
  end

  assign z = {c_row[N-2:0], ~c_row[N-1]} & {N{~special}};

  ieac_adder #(.N(N), .ADDER(ADDER)) u_ieac (
    .x  (s_row),
    .z  (z),
    .s  (s_add),
    .msb(msb_add)
  );

  assign d = {msb_add, s_add};

endmodule
