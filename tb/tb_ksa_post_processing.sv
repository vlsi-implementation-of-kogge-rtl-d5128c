// tb_ksa_post_processing: self-check of the sum stage at N = 32.
//
// Builds the per-bit pairs and carries from random operand pairs the way a
// ripple adder would (carry[i+1] = majority of a_i, b_i, carry[i]) and checks
// that the stage returns a + b + cin and its carry-out. Random carry vectors
// that do not come from an addition are checked bit by bit as well. One
// vector per 1 ns step; a watchdog ends the run after 100000 steps.
module tb_ksa_post_processing;
  import ksa_pkg::*;

  localparam int unsigned N = 32;

  pg_t  [N-1:0] pg;
  logic [N:0]   carry;
  logic [N-1:0] sum;
  logic         cout;
  int checks = 0, failures = 0;

  ksa_post_processing dut (.pg(pg), .carry(carry), .sum(sum), .cout(cout));

  initial begin
    #100000ns;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic add(input logic [N-1:0] a, input logic [N-1:0] b, input logic ci);
    logic [N:0] exp;
    carry[0] = ci;
    for (int i = 0; i < N; i++) begin
      pg[i].p = a[i] ^ b[i];
      pg[i].g = a[i] & b[i];
      carry[i+1] = (a[i] & b[i]) | (a[i] & carry[i]) | (b[i] & carry[i]);
    end
    #1ns;
    exp = {1'b0, a} + {1'b0, b} + {{N{1'b0}}, ci};
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h ci=%b got %b_%h exp %h", a, b, ci, cout, sum, exp);
    end
  endtask

  initial begin
    add(32'h56AA548A, 32'h6AAA5555, 1'b1);
    add('1, '0, 1'b1);
    add('1, '1, 1'b1);
    for (int k = 0; k < 300; k++) add($urandom, $urandom, 1'($urandom));
    for (int k = 0; k < 100; k++) begin
      logic [N-1:0] p;
      p = $urandom;
      for (int i = 0; i < N; i++) begin
        pg[i].p = p[i];
        pg[i].g = 1'b0;
      end
      carry = {1'($urandom), 32'($urandom)};
      #1ns;
      checks++;
      for (int i = 0; i < N; i++)
        if (sum[i] !== (p[i] != carry[i])) begin
          failures++;
          $display("FAIL bit %0d", i);
          break;
        end
      checks++;
      if (cout !== carry[N]) begin
        failures++;
        $display("FAIL cout");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
