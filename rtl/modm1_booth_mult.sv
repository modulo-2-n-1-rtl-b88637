// modm1_booth_mult: modulo 2^n-1 modified Booth multiplier.
//
// Computes P = |A * B| mod (2^n - 1) for unsigned n-bit A and B (n even).
// B is recoded into n/2 Booth digits; because 2^n = 1 modulo 2^n-1 the lowest
// encoder reads b[n-1] where an ordinary multiplier reads 0, which folds the
// top weight of B back in. Each digit drives a selector row that rotates A by
// 2i bits (multiplication by 4^i) and complements it for a negative digit, so
// every partial product is n bits with no sign extension. Rows of full adders
// with end-around carry reduce the n/2 partial products to two vectors (for
// n = 8: rows 0,1,2 in the first, the result and row 3 in the second), and the
// end-around-carry modulo adder gives P. A result of 2^n-1 is the second code
// of zero. Structure as published for n = 8; the modulus, complement rule and
// final-adder network (ADDER, default Kogge-Stone) are read or chosen here.
//
// Interface and timing: purely combinational, no clock.
module modm1_booth_mult
  import modarith_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter adder_e      ADDER = ADD_KSA
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] p
);

  if (N < 2 || (N % 2) != 0) begin : g_bad_n
    $error("modm1_booth_mult: N must be even and >= 2");
  end

  localparam int unsigned NPP = N / 2;

  logic [N-1:0] pp [NPP];
  logic [N:0]   bx;  // {b, b[n-1]}: b[-1] replaced by b[n-1]

  assign bx = {b, b[N-1]};

  for (genvar i = 0; i < NPP; i++) begin : g_pp
    logic one, two, neg;
    booth_encoder u_enc (.b3(bx[2*i+2 -: 3]), .one, .two, .neg);
    booth_selector_row #(.N(N), .ROW(i)) u_sel (.a, .one, .two, .neg, .pp(pp[i]));
  end

  if (NPP == 1) begin : g_one
    assign p = pp[0];
  end else if (NPP == 2) begin : g_two
    eac_adder #(.N(N), .ADDER(ADDER)) u_add (.x(pp[0]), .z(pp[1]), .s(p));
  end else begin : g_tree
    // rs[k], rc[k]: outputs of full-adder row k
    logic [N-1:0] rs [NPP-2];
    logic [N-1:0] rc [NPP-2];
    eac_csa_row #(.N(N)) u_row0 (.x(pp[0]), .y(pp[1]), .z(pp[2]), .s(rs[0]), .c(rc[0]));
    for (genvar k = 1; k < NPP - 2; k++) begin : g_row
      eac_csa_row #(.N(N)) u_row (.x(rs[k-1]), .y(rc[k-1]), .z(pp[k+2]), .s(rs[k]), .c(rc[k]));
    end
    eac_adder #(.N(N), .ADDER(ADDER)) u_add (.x(rs[NPP-3]), .z(rc[NPP-3]), .s(p));
  end

endmodule
