// ksa_post_processing: last stage of the Kogge-Stone adder.
//
// Each sum bit is the bit's own propagate XOR the carry coming into it:
//   sum[i] = P_i XOR carry[i]
// (carry[0] is the carry-in), the published sum equation. The carry-out is the carry out of the top bit,
// carry[N]. Combinational, one XOR level.
// cout is carry[N] passed through, so that the adder's outputs all leave
// from this stage; the per-bit generates are not needed here.
//
// Interface: pg[N] (per-bit pairs from pre-processing), carry[N:0] in;
// sum[N-1:0], cout out.
module ksa_post_processing
  import ksa_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  pg_t  [N-1:0] pg,
  input  logic [N:0]   carry,
  output logic [N-1:0] sum,
  output logic         cout
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      sum[i] = pg[i].p ^ carry[i];
    end
    cout = carry[N];
  end

endmodule
