// tb_ksa_carry_tree: self-check of the Kogge-Stone prefix tree.
//
// The reference for each bit i walks bits 0..i in order: the group generate
// becomes g_i | (p_i & previous group generate) and the group propagate
// p_i & previous group propagate, i.e. the serial definition of the spans
// i:0. Checked at N = 32 (5 levels) with directed and random inputs, and at
// N = 7 (3 levels, not a power of two) exhaustively over all 2**14 inputs.
// One vector per 1 ns step; a watchdog ends the run after 200000 steps.
module tb_ksa_carry_tree;
  import ksa_pkg::*;

  localparam int unsigned N  = 32;
  localparam int unsigned NS = 7;

  pg_t [N-1:0]  pg_in,  pg_out;
  pg_t [NS-1:0] pgs_in, pgs_out;
  int checks = 0, failures = 0;

  ksa_carry_tree dut (.pg_in(pg_in),  .pg_out(pg_out));
  ksa_carry_tree #(.N(NS)) dut_s (.pg_in(pgs_in), .pg_out(pgs_out));

  initial begin
    #200000ns;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Per-bit (g,p) from an operand pair, so inputs are physically consistent
  // (g and p never both set) as well as arbitrary.
  task automatic check_big(input logic [N-1:0] g, input logic [N-1:0] p);
    logic run_g, run_p;
    for (int i = 0; i < N; i++) begin
      pg_in[i].g = g[i];
      pg_in[i].p = p[i];
    end
    #1ns;
    run_g = 1'b0; run_p = 1'b1;
    for (int i = 0; i < N; i++) begin
      run_g = g[i] | (p[i] & run_g);
      run_p = p[i] & run_p;
      checks++;
      if (pg_out[i].g !== run_g || pg_out[i].p !== run_p) begin
        failures++;
        $display("FAIL N=%0d bit %0d got g=%b p=%b exp g=%b p=%b",
                 N, i, pg_out[i].g, pg_out[i].p, run_g, run_p);
      end
    end
  endtask

  initial begin
    logic [N-1:0] a, b;
    check_big('0, '0);
    check_big('0, '1);
    check_big(32'h1, 32'hFFFF_FFFE);          // generate at 0, propagates to the top
    check_big(32'h56AA548A & 32'h6AAA5555, 32'h56AA548A ^ 32'h6AAA5555);
    for (int k = 0; k < 300; k++) begin
      a = $urandom; b = $urandom;
      check_big(a & b, a ^ b);
    end
    for (int k = 0; k < 300; k++) check_big($urandom, $urandom);  // any g/p mix

    for (int v = 0; v < (1 << (2 * NS)); v++) begin
      logic run_g, run_p;
      for (int i = 0; i < NS; i++) begin
        pgs_in[i].g = v[2*i];
        pgs_in[i].p = v[2*i+1];
      end
      #1ns;
      run_g = 1'b0; run_p = 1'b1;
      for (int i = 0; i < NS; i++) begin
        run_g = v[2*i] | (v[2*i+1] & run_g);
        run_p = v[2*i+1] & run_p;
        checks++;
        if (pgs_out[i].g !== run_g || pgs_out[i].p !== run_p) begin
          failures++;
          $display("FAIL N=%0d v=%h bit %0d", NS, v, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
