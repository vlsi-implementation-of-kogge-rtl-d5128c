// ksa_gray_cell: reduced prefix operator producing only the group generate.
//
// Merges an upper span i:k (G and P) with the generate of the lower span
// k-1:j:  G_i:j = G_i:k OR (P_i:k AND G_k-1:j).
// When the lower span is the carry-in, G_i:j is the carry out of bit i, so a
// row of these cells turns group signals into carries. The equation follows
// the published design; its use for the carry-in row is this implementation's.
//
// Interface: hi (span i:k), g_lo (generate of k-1:j) in; g_out out.
// Combinational, one AND-OR level.
module ksa_gray_cell
  import ksa_pkg::*;
(
  input  pg_t  hi,
  input  logic g_lo,
  output logic g_out
);

  assign g_out = hi.g | (hi.p & g_lo);

endmodule
