// tb_ksa_parallel_carry: self-check of the carry-in merge row at N = 32.
//
// Drives random and directed group pairs and both carry-in values. The
// expected carry into bit i+1 is worked out case by case: 1 if the group
// i:0 generates, else the carry-in if the group propagates, else 0; carry[0]
// must equal the carry-in. One vector per 1 ns step; a watchdog ends the run
// after 100000 steps.
module tb_ksa_parallel_carry;
  import ksa_pkg::*;

  localparam int unsigned N = 32;

  pg_t  [N-1:0] pg_grp;
  logic         cin;
  logic [N:0]   carry;
  int checks = 0, failures = 0;

  ksa_parallel_carry dut (.pg_grp(pg_grp), .cin(cin), .carry(carry));

  initial begin
    #100000ns;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] g, input logic [N-1:0] p, input logic ci);
    logic [N:0] exp_c;
    for (int i = 0; i < N; i++) begin
      pg_grp[i].g = g[i];
      pg_grp[i].p = p[i];
    end
    cin = ci;
    #1ns;
    exp_c[0] = ci;
    for (int i = 0; i < N; i++) begin
      if (g[i])      exp_c[i+1] = 1'b1;
      else if (p[i]) exp_c[i+1] = ci;
      else           exp_c[i+1] = 1'b0;
    end
    checks++;
    if (carry !== exp_c) begin
      failures++;
      $display("FAIL g=%h p=%h cin=%b carry=%h exp=%h", g, p, ci, carry, exp_c);
    end
  endtask

  initial begin
    apply('0, '1, 1'b1);
    apply('0, '1, 1'b0);
    apply('1, '0, 1'b0);
    for (int k = 0; k < 400; k++) apply($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
