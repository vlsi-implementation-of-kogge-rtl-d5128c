// ksa_black_cell: full prefix operator of the carry tree.
//
// Merges the (G,P) pair of an upper span i:k with that of the adjacent lower
// span k-1:j into the pair of the whole span i:j:
//   P_i:j = P_i:k AND P_k-1:j
//   G_i:j = G_i:k OR (P_i:k AND G_k-1:j)
// Used wherever a later level still needs the group propagate. Equations and
// the i:k / k-1:j / i:j naming follow the published design.
//
// Interface: hi (span i:k), lo (span k-1:j) in; out (span i:j). Combinational,
// one AND and one AND-OR level.
module ksa_black_cell
  import ksa_pkg::*;
(
  input  pg_t hi,
  input  pg_t lo,
  output pg_t out
);

  always_comb begin
    out.p = hi.p & lo.p;
    out.g = hi.g | (hi.p & lo.g);
  end

endmodule
