// tb_ksa_pre_processing: self-check of the propagate/generate stage at N = 32.
//
// Drives directed and random operand pairs and checks every bit: propagate
// must be set exactly where the operand bits differ, generate exactly where
// both are one (checked through a + b = (p) + 2*(g), plus the per-bit
// definitions). One vector per 1 ns step; a watchdog ends the run after
// 100000 steps.
module tb_ksa_pre_processing;
  import ksa_pkg::*;

  localparam int unsigned N = 32;

  logic [N-1:0] a, b;
  pg_t  [N-1:0] pg;
  int checks = 0, failures = 0;

  ksa_pre_processing dut (.a(a), .b(b), .pg(pg));

  initial begin
    #100000ns;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] va, input logic [N-1:0] vb);
    logic [N-1:0] pv, gv;
    a = va; b = vb;
    #1ns;
    for (int i = 0; i < N; i++) begin
      pv[i] = pg[i].p;
      gv[i] = pg[i].g;
    end
    checks++;
    // Arithmetic identity: a + b = p + 2g (independent of bitwise operators).
    if ({1'b0, va} + {1'b0, vb} != {1'b0, pv} + {gv, 1'b0}) begin
      failures++;
      $display("FAIL sum identity a=%h b=%h p=%h g=%h", va, vb, pv, gv);
    end
    for (int i = 0; i < N; i++) begin
      int ones;
      ones = int'(va[i]) + int'(vb[i]);
      checks++;
      if (pv[i] != (ones == 1) || gv[i] != (ones == 2)) begin
        failures++;
        $display("FAIL bit %0d a=%b b=%b p=%b g=%b", i, va[i], vb[i], pv[i], gv[i]);
      end
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, '0);
    apply(32'h56AA548A, 32'h6AAA5555);
    for (int k = 0; k < 200; k++) apply($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
