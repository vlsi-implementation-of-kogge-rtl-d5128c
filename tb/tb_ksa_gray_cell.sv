// tb_ksa_gray_cell: exhaustive self-check of the gray (generate-only) cell.
//
// Applies all 8 combinations of the upper (G,P) pair and the lower generate
// and checks the merged generate: set when the upper span generates, or when
// the lower span generates and the upper span propagates. One input set per
// 1 ns step; a watchdog ends the run after 1000 steps.
module tb_ksa_gray_cell;
  import ksa_pkg::*;

  pg_t  hi;
  logic g_lo, g_out;
  int   checks = 0, failures = 0;

  ksa_gray_cell dut (.hi(hi), .g_lo(g_lo), .g_out(g_out));

  initial begin
    #1000ns;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic exp_g;
      {hi.g, hi.p, g_lo} = 3'(v);
      #1ns;
      exp_g = hi.g ? 1'b1 : (hi.p ? g_lo : 1'b0);
      checks++;
      if (g_out !== exp_g) begin
        failures++;
        $display("FAIL hi=%b g_lo=%b g_out=%b exp=%b", hi, g_lo, g_out, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
