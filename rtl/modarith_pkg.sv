// modarith_pkg: types shared by the modulo 2^n+1 / 2^n-1 arithmetic units.
//
// adder_e selects the carry network inside an end-around-carry adder. The four
// choices are the four parallel adders the units were evaluated with: ripple
// carry, carry look-ahead, Kogge-Stone and Brent-Kung. The enum itself is a
// choice of this RTL; the networks are in rca_carry, cla_carry, ks_prefix and
// bk_prefix.
package modarith_pkg;

  typedef enum logic [1:0] {
    ADD_RCA = 2'd0,  // ripple carry chain
    ADD_CLA = 2'd1,  // flat two-level carry look-ahead
    ADD_KSA = 2'd2,  // Kogge-Stone parallel prefix
    ADD_BKA = 2'd3   // Brent-Kung parallel prefix
  } adder_e;

endpackage
