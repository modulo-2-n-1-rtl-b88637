// cla_carry: carry look-ahead network.
//
// Same interface as rca_carry: per-bit g/p in, group terms G[i:0] / P[i:0]
// out. Every group term is written out directly as a two-level expression,
//   G[i:0] = OR over j<=i of ( g[j] AND p[j+1] AND ... AND p[i] ),
//   P[i:0] = p[0] AND ... AND p[i],
// so no carry waits for the carry of the bit below, which is what a carry
// look-ahead adder does. For the 8-bit width used here that is a flat 8-input
// look-ahead; a wider N would normally be split into look-ahead blocks, which
// this module does not do. The published unit names an 8-bit carry
// look-ahead adder fed with g and p; the flat form is this design's reading.
// Purely combinational.
module cla_carry #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  output logic [N-1:0] gg,
  output logic [N-1:0] pp
);

  for (genvar i = 0; i < N; i++) begin : g_bit
    logic [i:0] term;  // term[j]: g[j] propagated through bits j+1..i
    for (genvar j = 0; j <= i; j++) begin : g_term
      if (j == i) begin : g_top
        assign term[j] = g[j];
      end else begin : g_low
        assign term[j] = g[j] & (&p[i:j+1]);
      end
    end
    assign gg[i] = |term;
    assign pp[i] = &p[i:0];
  end

endmodule
