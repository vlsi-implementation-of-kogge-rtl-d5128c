// tb_koggestone_zfc_small: exhaustive check of the adder at reduced widths.
//
// Instantiates the adder with N = 6 (3 tree levels, not a power of two) and
// N = 8 (3 full levels) and applies every operand pair with both carry-in
// values, comparing {c32, sum} with a + b + c0. One vector per 1 ns step; a
// watchdog ends the run after 400000 steps.
module tb_koggestone_zfc_small;

  logic [5:0] a6, b6, s6;
  logic [7:0] a8, b8, s8;
  logic       c0, co6, co8;
  int checks = 0, failures = 0;

  koggestone_zfc #(.N(6)) dut6 (.a(a6), .b(b6), .c0(c0), .sum(s6), .c32(co6));
  koggestone_zfc #(.N(8)) dut8 (.a(a8), .b(b8), .c0(c0), .sum(s8), .c32(co8));

  initial begin
    #400000ns;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ci = 0; ci < 2; ci++)
      for (int x = 0; x < 256; x++)
        for (int y = 0; y < 256; y++) begin
          a8 = 8'(x); b8 = 8'(y); a6 = 6'(x); b6 = 6'(y); c0 = 1'(ci);
          #1ns;
          checks++;
          if ({co8, s8} !== 9'(x + y + ci)) begin
            failures++;
            $display("FAIL N=8 %0d+%0d+%0d got %0d", x, y, ci, {co8, s8});
          end
          if (x < 64 && y < 64) begin
            checks++;
            if ({co6, s6} !== 7'(x + y + ci)) begin
              failures++;
              $display("FAIL N=6 %0d+%0d+%0d got %0d", x, y, ci, {co6, s6});
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
