// ks_prefix: Kogge-Stone parallel-prefix carry network.
//
// Same interface as rca_carry: per-bit g/p in, group terms G[i:0] / P[i:0]
// out. There are log2(N) levels; at level k every bit i >= 2^k combines its
// (g,p) pair with that of bit i - 2^k using the prefix operator
//   (g, p) o (g', p') = (g | p & g', p & p'),
// and bits below 2^k pass their pair on unchanged. Every bit is thus done after
// log2(N) cells with a fan-out of 2, at the cost of many long wires; for N = 8
// this is the three-level tree of the published 8-bit Kogge-Stone structure
// (cells at bits 1-7, 2-7 and 4-7). N must be a power of two. Purely
// combinational.
module ks_prefix #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  output logic [N-1:0] gg,
  output logic [N-1:0] pp
);

  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("ks_prefix: N must be a power of two >= 2");
  end

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] gl [LEVELS+1];
  logic [N-1:0] pl [LEVELS+1];

  assign gl[0] = g;
  assign pl[0] = p;

  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (i >= (1 << k)) begin : g_cell
        assign gl[k+1][i] = gl[k][i] | (pl[k][i] & gl[k][i - (1 << k)]);
        assign pl[k+1][i] = pl[k][i] & pl[k][i - (1 << k)];
      end else begin : g_pass
        assign gl[k+1][i] = gl[k][i];
        assign pl[k+1][i] = pl[k][i];
      end
    end
  end

  assign gg = gl[LEVELS];
  assign pp = pl[LEVELS];

endmodule
