// zero_handling: zero-result unit of the diminished-one subtractor.
//
// In diminished-one form a value X is carried as X* = X - 1 plus a flag X_z
// that is 1 when X = 0. This unit forms D_z, the zero flag of D = A - B:
//   both operands zero       -> D = 0
//   exactly one operand zero -> D = A or -B, never zero
//   neither zero             -> D = 0 exactly when A* = B*, which the IEAC
//                               adder shows as all bits of A* ^ ~B* set
//                               (its all-propagate output, all_p).
// The unit and its three inputs are as published; the equation is derived.
// Purely combinational.
module zero_handling (
  input  logic a_z,
  input  logic b_z,
  input  logic all_p,
  output logic d_z
);

  assign d_z = (a_z & b_z) | (~a_z & ~b_z & all_p);

endmodule
