// rca_carry: ripple-carry network.
//
// Given per-bit generate g[i] and propagate p[i], returns for every bit i the
// group generate gg[i] = G[i:0] and group propagate pp[i] = P[i:0]. Each group
// term is built from the one below it, so the delay grows linearly with N, as
// in a ripple carry adder's chain of full adders. gg[i] is the carry out of
// bit i with carry-in 0; pp[i] says a carry-in would travel through bits i..0.
// Purely combinational. The ripple adder is one of the four adders the
// modulo units were published with; the interface (g/p in, group g/p out),
// shared by all four networks so the modulo adders can swap them, is this
// design's own.
module rca_carry #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  output logic [N-1:0] gg,
  output logic [N-1:0] pp
);

  assign gg[0] = g[0];
  assign pp[0] = p[0];

  for (genvar i = 1; i < N; i++) begin : g_chain
    assign gg[i] = g[i] | (p[i] & gg[i-1]);
    assign pp[i] = p[i] & pp[i-1];
  end

endmodule
