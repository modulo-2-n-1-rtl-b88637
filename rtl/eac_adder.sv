// eac_adder: n-bit end-around-carry adder, modulo 2^n-1.
//
// Returns s = |X + Z| mod (2^n - 1): the carry out of the top bit has weight
// 2^n = 1 and is added back at bit 0. When X + Z = 2^n - 1 the result is all
// ones, the second code of zero in modulo 2^n-1 arithmetic; users compare
// modulo 2^n-1. Same three stages as ieac_adder: g/p, a carry network chosen
// by ADDER, and post-processing c[i] = G[i-1:0] | P[i-1:0] & G[n-1:0], which
// adds the end-around carry without a loop (this design's choice). Used as
// the final modulo adder of the Booth multiplier. Purely combinational.
module eac_adder
  import modarith_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter adder_e      ADDER = ADD_KSA
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] z,
  output logic [N-1:0] s
);

  logic [N-1:0] g, p, gg, pp;
  logic [N-1:0] c;
  logic         cin;

  assign g = x & z;
  assign p = x ^ z;

  carry_net #(.N(N), .ADDER(ADDER)) u_net (.g, .p, .gg, .pp);

  assign cin = gg[N-1];

  always_comb begin
    c[0] = cin;
    for (int i = 1; i < N; i++) c[i] = gg[i-1] | (pp[i-1] & cin);
  end

  assign s = p ^ c;

endmodule
