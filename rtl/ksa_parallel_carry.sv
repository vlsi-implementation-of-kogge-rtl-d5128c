// ksa_parallel_carry: parallel carry row of the Kogge-Stone adder.
//
// The carry tree gives each bit the group pair (G[i:0], P[i:0]) of the
// operands alone. This row merges the external carry-in into all of them at
// once with one gray cell per bit:
//   carry[i+1] = G[i:0] OR (P[i:0] AND cin)
// so every carry is ready one AND-OR level after the tree, with no rippling.
// carry[0] is the carry-in itself and carry[N] the carry-out of the adder.
// carry[0] is wired straight from cin so the sum stage sees one carry vector.
// Placing the carry-in merge here, after the tree, is this implementation's
// reading of the "parallel carry" stage.
//
// Interface: pg_grp[N], cin in; carry[N:0] out. Combinational.
module ksa_parallel_carry
  import ksa_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  pg_t  [N-1:0] pg_grp,
  input  logic         cin,
  output logic [N:0]   carry
);

  assign carry[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    ksa_gray_cell u_gray (
      .hi   (pg_grp[i]),
      .g_lo (cin),
      .g_out(carry[i+1])
    );
  end

endmodule
