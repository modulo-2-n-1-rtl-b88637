// ieac_adder: n-bit inverted-end-around-carry (IEAC) adder for modulo 2^n+1.
//
// For n-bit X and Z it returns |X + Z + 1| mod (2^n + 1) as an (n+1)-bit
// number {msb, s}. The low n bits are X + Z plus the inverted carry out of the
// top bit; the MSB is set when X and Z are bitwise complementary, the only
// case in which the result is 2^n (then s = 0). This is the same adder that
// adds diminished-one operands; there msb (the all-propagate signal P[n-1:0])
// says the result is zero.
//
// Three stages: pre-processing forms g = x & z, p = x ^ z; a carry network
// (chosen by ADDER) forms the group terms G[i:0], P[i:0]; post-processing
// re-enters the inverted carry out cin = ~G[n-1:0] as
//   c[i] = G[i-1:0] | P[i-1:0] & cin,  s[i] = p[i] ^ c[i].
// Writing the end-around carry in this form keeps the circuit loop-free; it
// is this design's choice. Purely combinational.
module ieac_adder
  import modarith_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter adder_e      ADDER = ADD_KSA
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] z,
  output logic [N-1:0] s,
  output logic         msb
);

  logic [N-1:0] g, p, gg, pp;
  logic [N-1:0] c;
  logic         cin;

  assign g = x & z;
  assign p = x ^ z;

  carry_net #(.N(N), .ADDER(ADDER)) u_net (.g, .p, .gg, .pp);

  assign cin = ~gg[N-1];

  always_comb begin
    c[0] = cin;
    for (int i = 1; i < N; i++) c[i] = gg[i-1] | (pp[i-1] & cin);
  end

  assign s     = p ^ c;
  assign msb = pp[N-1];

endmodule
