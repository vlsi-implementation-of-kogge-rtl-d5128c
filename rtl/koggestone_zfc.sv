// koggestone_zfc: 32-bit Kogge-Stone parallel-prefix adder.
//
// sum = a + b + c0, with the carry-out on c32. Instead of letting the carry
// ripple from bit to bit, the adder computes every carry in parallel in
// ceil(log2 N) prefix levels:
//   1. ksa_pre_processing  per-bit propagate p = a^b and generate g = a&b
//   2. ksa_carry_tree      Kogge-Stone tree of black cells -> G[i:0], P[i:0]
//   3. ksa_parallel_carry  one row of gray cells merges c0 into every group:
//                          carry[i+1] = G[i:0] | (P[i:0] & c0)
//   4. ksa_post_processing sum[i] = p[i] ^ carry[i], c32 = carry[N]
// The stage order, the cell equations and the port names a, b, c0, sum, c32
// follow the published design; merging the carry-in after the tree rather
// than at bit 0 is this implementation's choice. There is no clock: the
// adder is combinational and its result is valid after the logic settles.
//
// Parameter N: operand width, 32 by default; any N >= 1 works.
module koggestone_zfc
  import ksa_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         c0,
  output logic [N-1:0] sum,
  output logic         c32
);

  pg_t  [N-1:0] pg_bit;   // per-bit (g, p)
  pg_t  [N-1:0] pg_grp;   // group (G[i:0], P[i:0])
  logic [N:0]   carry;    // carry into bit i; carry[N] = carry-out

  ksa_pre_processing #(.N(N)) u_pre (
    .a (a),
    .b (b),
    .pg(pg_bit)
  );

  ksa_carry_tree #(.N(N)) u_tree (
    .pg_in (pg_bit),
    .pg_out(pg_grp)
  );

  ksa_parallel_carry #(.N(N)) u_carry (
    .pg_grp(pg_grp),
    .cin   (c0),
    .carry (carry)
  );

  ksa_post_processing #(.N(N)) u_post (
    .pg   (pg_bit),
    .carry(carry),
    .sum  (sum),
    .cout (c32)
  );

endmodule
