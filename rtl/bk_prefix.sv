// bk_prefix: Brent-Kung parallel-prefix carry network.
//
// Same interface as rca_carry: per-bit g/p in, group terms G[i:0] / P[i:0]
// out, using the prefix operator (g, p) o (g', p') = (g | p & g', p & p').
// Up-sweep, levels 0 .. L-1 (L = log2 N): at level k, bit i with
// (i+1) mod 2^(k+1) == 0 combines with bit i - 2^k, forming the prefixes of
// 2-, 4-, 8-bit groups. Down-sweep, levels L .. 2L-2: the group prefixes fan
// back down; at down level for span 2^k (k = L-2 .. 0), bit i with
// (i+1) mod 2^(k+1) == 2^k and i > 2^k combines with bit i - 2^k. In total
// 2 log2(N) - 1 levels with fan-out at most 2 and far fewer cells than
// Kogge-Stone. This follows the published description of the tree; the
// exact cell placement is the standard one. No buffers are placed. N must be a power of two. Purely
// combinational.
module bk_prefix #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  output logic [N-1:0] gg,
  output logic [N-1:0] pp
);

  if (N < 2 || (N & (N - 1)) != 0) begin : g_bad_n
    $error("bk_prefix: N must be a power of two >= 2");
  end

  localparam int unsigned L      = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned STAGES = 2 * L - 1;

  // Span (distance to the partner bit) used at stage s, and whether bit i
  // has a prefix cell at stage s.
  function automatic int unsigned span(input int unsigned s);
    return (s < L) ? (1 << s) : (1 << (2 * L - 2 - s));
  endfunction

  function automatic bit has_cell(input int unsigned s, input int unsigned i);
    int unsigned step;
    step = span(s);
    if (s < L) return ((i + 1) % (2 * step)) == 0;
    else       return (((i + 1) % (2 * step)) == step) && (i > step);
  endfunction

  logic [N-1:0] gl [STAGES+1];
  logic [N-1:0] pl [STAGES+1];

  assign gl[0] = g;
  assign pl[0] = p;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (has_cell(s, i)) begin : g_cell
        assign gl[s+1][i] = gl[s][i] | (pl[s][i] & gl[s][i - span(s)]);
        assign pl[s+1][i] = pl[s][i] & pl[s][i - span(s)];
      end else begin : g_pass
        assign gl[s+1][i] = gl[s][i];
        assign pl[s+1][i] = pl[s][i];
      end
    end
  end

  assign gg = gl[STAGES];
  assign pp = pl[STAGES];

endmodule
