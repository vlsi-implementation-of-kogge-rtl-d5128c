// ksa_carry_tree: Kogge-Stone carry generation tree.
//
// Takes the per-bit (G_i, P_i) pairs and produces, for every bit i, the group
// pair (G[i:0], P[i:0]) of the span from bit i down to bit 0. It uses
// recursive doubling: at level l (l = 1 .. ceil(log2 N)) every bit i with
// i >= 2**(l-1) combines its current span with the span ending just below it,
// bit i - 2**(l-1), in a black cell; lower bits already cover down to bit 0
// and pass unchanged. Each level doubles the span, so after ceil(log2 N)
// levels every span reaches bit 0. Bit 0 is its own group, so pg_out[0] is
// pg_in[0] unchanged. Every cell has fan-out at most two, at the
// cost of many long lateral wires.
//
// For N = 32 this is 5 levels and 31+30+28+24+16 = 129 black cells
// (n*log2(n) - n + 1), the level count and node count the published design
// states. All nodes are black cells because the carry-in is
// merged afterwards, which needs P[i:0] for every i.
//
// Interface: pg_in[N] in, pg_out[N] out. Combinational, ceil(log2 N) cell
// levels deep.
module ksa_carry_tree
  import ksa_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  pg_t [N-1:0] pg_in,
  output pg_t [N-1:0] pg_out
);

  localparam int unsigned LEVELS = ks_levels(N);

  // lvl[l][i]: (G,P) of the span ending at bit i after level l.
  pg_t [N-1:0] lvl [LEVELS+1];

  assign lvl[0] = pg_in;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    localparam int unsigned DIST = 1 << (l - 1);
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (i >= DIST) begin : g_node
        ksa_black_cell u_black (
          .hi (lvl[l-1][i]),
          .lo (lvl[l-1][i-DIST]),
          .out(lvl[l][i])
        );
      end else begin : g_pass
        assign lvl[l][i] = lvl[l-1][i];
      end
    end
  end

  assign pg_out = lvl[LEVELS];

endmodule
