// modulo_arith_top: the modulo 2^n +- 1 arithmetic units side by side.
//
// All units are combinational and work on n-bit residues (n = N = 8 by
// default, so moduli 257 and 255):
//   u_addsub_rca  combined adder/subtractor, normal representation, ripple
//                 carry IEAC adder                      -> d_addsub_rca
//   u_addsub_cla  the same on a carry look-ahead IEAC adder -> d_addsub_cla
//   u_sub_mux     subtract-only unit with multiplexers, Brent-Kung IEAC adder
//                                                       -> d_sub_mux
//   u_dim_ks      diminished-one subtractor, Kogge-Stone -> d_dim_ks, dz_dim_ks
//   u_dim_bk      diminished-one subtractor, Brent-Kung  -> d_dim_bk, dz_dim_bk
//   u_mult        modulo 2^n-1 modified Booth multiplier -> prod
// The three normal-representation units share operands a, b ((n+1) bits, in
// [0, 2^n]) and the add/subtract mode m (the subtractor ignores m). The two
// diminished-one units share a_dim/a_z and b_dim/b_z. The multiplier has its
// own operands. Which carry network each unit uses here is this design's
// pick among those the architecture was evaluated with.
//
// Timing: no clock; every output settles combinationally from the inputs.
module modulo_arith_top
  import modarith_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N:0]   a,
  input  logic [N:0]   b,
  input  logic         m,
  input  logic [N-1:0] a_dim,
  input  logic         a_z,
  input  logic [N-1:0] b_dim,
  input  logic         b_z,
  input  logic [N-1:0] mul_a,
  input  logic [N-1:0] mul_b,
  output logic [N:0]   d_addsub_rca,
  output logic [N:0]   d_addsub_cla,
  output logic [N:0]   d_sub_mux,
  output logic [N-1:0] d_dim_ks,
  output logic         dz_dim_ks,
  output logic [N-1:0] d_dim_bk,
  output logic         dz_dim_bk,
  output logic [N-1:0] prod
);

  modp1_addsub #(.N(N), .ADDER(ADD_RCA)) u_addsub_rca (
    .a, .b, .m, .d(d_addsub_rca)
  );

  modp1_addsub #(.N(N), .ADDER(ADD_CLA)) u_addsub_cla (
    .a, .b, .m, .d(d_addsub_cla)
  );

  modp1_sub_mux #(.N(N), .ADDER(ADD_BKA)) u_sub_mux (
    .a, .b, .d(d_sub_mux)
  );

  modp1_sub_dim1 #(.N(N), .ADDER(ADD_KSA)) u_dim_ks (
    .a_dim, .a_z, .b_dim, .b_z, .d_dim(d_dim_ks), .d_z(dz_dim_ks)
  );

  modp1_sub_dim1 #(.N(N), .ADDER(ADD_BKA)) u_dim_bk (
    .a_dim, .a_z, .b_dim, .b_z, .d_dim(d_dim_bk), .d_z(dz_dim_bk)
  );

  modm1_booth_mult #(.N(N), .ADDER(ADD_KSA)) u_mult (
    .a(mul_a), .b(mul_b), .p(prod)
  );

endmodule
