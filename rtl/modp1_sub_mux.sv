// modp1_sub_mux: modulo 2^n+1 subtractor, normal representation, with
// multiplexers.
//
// Computes D = |A - B| mod (2^n+1) for (n+1)-bit operands A, B in [0, 2^n];
// D is (n+1) bits, in [0, 2^n]. It is the subtract-only form of modp1_addsub:
// B is complemented, a row of full adders adds A_low, ~B_low and the
// correction bits c'' (only c''_0 = ~a_n & b_n can be 1), and its top carry
// wraps to bit 0 inverted. Instead of gating the carries, two multiplexers
// feed the IEAC adder either the row's sum and carry vectors or, when
// a_n & ~b_n (A = 2^n, B < 2^n), the low bits of A (all zero then) and
// ~B_low; the adder then returns ~B_low + 1 = 2^n - B. The IEAC adder's MSB
// detects complementary inputs (result 2^n). The multiplexer inputs follow the
// published architecture; the correction bits are derived here. ADDER picks the
// carry network (all four were evaluated for this unit; default Brent-Kung).
//
// Interface and timing: purely combinational, no clock. The subtractor has no
// mode input.
module modp1_sub_mux
  import modarith_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter adder_e      ADDER = ADD_BKA
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] d
);

  logic [N-1:0] bn;     // ~B_low
  logic [N-1:0] cc;     // correction bits c''
  logic [N-1:0] s_row, c_row, z_row;
  logic         sel;    // multiplexer select: A = 2^n and B < 2^n
  logic [N-1:0] x_add, z_add, s_add;
  logic         msb_add;

  assign bn  = ~b[N-1:0];
  assign sel = a[N] & ~b[N];

  always_comb begin
    cc    = '0;
    cc[0] = ~a[N] & b[N];
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      s_row[i] = a[i] ^ bn[i] ^ cc[i];
      c_row[i] = (a[i] & bn[i]) | (a[i] & cc[i]) | (bn[i] & cc[i]);
    end
  end

  assign z_row = {c_row[N-2:0], ~c_row[N-1]};

  // 0: carry-save outputs, 1: A_low and ~B_low
  assign x_add = sel ? a[N-1:0] : s_row;
  assign z_add = sel ? bn       : z_row;

  ieac_adder #(.N(N), .ADDER(ADDER)) u_ieac (
    .x  (x_add),
    .z  (z_add),
    .s  (s_add),
    .msb(msb_add)
  );

  assign d = {msb_add, s_add};

endmodule
