// tb_ksa_black_cell: exhaustive self-check of the black (full prefix) cell.
//
// Applies all 16 combinations of the upper and lower (G,P) pairs and checks
// the merged pair against a span-level reference: the merged span passes a
// carry only if both halves do, and produces one if the upper half does, or
// if the lower half does and the upper half passes it. One input set is
// applied per 1 ns step; a watchdog ends the run after 1000 steps.
module tb_ksa_black_cell;
  import ksa_pkg::*;

  pg_t hi, lo, out;
  int  checks = 0, failures = 0;

  ksa_black_cell dut (.hi(hi), .lo(lo), .out(out));

  initial begin
    #1000ns;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_g, exp_p;
      {hi.g, hi.p, lo.g, lo.p} = 4'(v);
      #1ns;
      exp_p = (hi.p && lo.p) ? 1'b1 : 1'b0;
      if (hi.g)                 exp_g = 1'b1;
      else if (hi.p && lo.g)    exp_g = 1'b1;
      else                      exp_g = 1'b0;
      checks++;
      if (out.g !== exp_g || out.p !== exp_p) begin
        failures++;
        $display("FAIL hi=%b lo=%b out=%b exp g=%b p=%b", hi, lo, out, exp_g, exp_p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
