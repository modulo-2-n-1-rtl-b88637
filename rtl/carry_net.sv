// carry_net: selects one of the four carry networks by parameter.
//
// Per-bit generate/propagate in, group generate G[i:0] and group propagate
// P[i:0] out, computed by the ripple chain (ADD_RCA), the flat carry
// look-ahead (ADD_CLA), the Kogge-Stone tree (ADD_KSA) or the Brent-Kung tree
// (ADD_BKA). The choice is made at elaboration; only the chosen network is
// built. Purely combinational.
module carry_net
  import modarith_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter adder_e      ADDER = ADD_KSA
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  output logic [N-1:0] gg,
  output logic [N-1:0] pp
);

  if (ADDER == ADD_RCA) begin : g_rca
    rca_carry #(.N(N)) u_net (.g, .p, .gg, .pp);
  end else if (ADDER == ADD_CLA) begin : g_cla
    cla_carry #(.N(N)) u_net (.g, .p, .gg, .pp);
  end else if (ADDER == ADD_KSA) begin : g_ksa
    ks_prefix #(.N(N)) u_net (.g, .p, .gg, .pp);
  end else begin : g_bka
    bk_prefix #(.N(N)) u_net (.g, .p, .gg, .pp);
  end

endmodule
