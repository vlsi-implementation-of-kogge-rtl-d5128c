// ksa_pre_processing: first stage of the Kogge-Stone adder.
//
// Forms, for every bit position i, the propagate P_i = A_i XOR B_i and the
// generate G_i = A_i AND B_i, the pre-processing equations of the published
// design. Packing them into one pg_t per bit is this implementation's choice.
//
// Interface: a, b (N bits) in; pg[N] out. Purely combinational, one gate
// level. N defaults to 32, the operand width of the adder.
module ksa_pre_processing
  import ksa_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output pg_t  [N-1:0] pg
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      pg[i].p = a[i] ^ b[i];
      pg[i].g = a[i] & b[i];
    end
  end

endmodule
