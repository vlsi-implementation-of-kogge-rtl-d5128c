// tb_koggestone_zfc: end-to-end self-check of the 32-bit adder at its
// default parameters.
//
// Every vector is compared with a + b + c0 computed as a 33-bit integer sum.
// The vectors are:
//   - the reference vector a = 0x56AA548A, b = 0x6AAA5555, c0 = 1, whose
//     expected result sum = 0xC154A9E0, c32 = 0 is also checked literally;
//   - a carry chain of every length 1..32, generated at bit 0 or entered
//     through c0 and propagated upward, so every level of the prefix tree has
//     to resolve a carry;
//   - corner values (all ones, zeros, maximum plus one) and 20000 random
//     vectors with random c0.
// The testbench counts how often each mechanism of the adder is exercised:
// the carry-in changing the result, a carry-out, a carry propagated over the
// whole word, and, for each tree level 1..5, a carry chain that needs that
// level (chain of 2**(l-1)+1 .. 2**l bits). A mechanism never exercised
// counts as a failure. The adder is combinational; one vector is applied per
// 1 ns step and a watchdog ends the run after 100000 steps.
module tb_koggestone_zfc;

  localparam int unsigned N      = 32;
  localparam int unsigned LEVELS = 5;

  logic [N-1:0] a, b, sum;
  logic         c0, c32;
  int checks = 0, failures = 0;

  int n_cin_used = 0, n_cout = 0, n_full_prop = 0;
  int n_level [LEVELS+1];

  koggestone_zfc dut (.a(a), .b(b), .c0(c0), .sum(sum), .c32(c32));

  initial begin
    #100000ns;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Longest distance a carry travels: from a generating bit (or c0, seen as
  // bit -1) through a run of propagating bits, counted in bits spanned.
  function automatic int longest_chain(logic [N-1:0] va, logic [N-1:0] vb, logic ci);
    int best = 0, run = -1;  // run: bits spanned by the live chain, -1 = none
    if (ci) run = 1;
    for (int i = 0; i < N; i++) begin
      if (va[i] & vb[i]) run = 1;                    // new chain starts here
      else if (va[i] ^ vb[i]) begin
        if (run > 0) run++;                          // chain passes through
      end else run = -1;                             // chain killed
      if (run > best) best = run;
    end
    return best;
  endfunction

  task automatic apply(input logic [N-1:0] va, input logic [N-1:0] vb, input logic ci);
    logic [N:0] exp, exp_nocin;
    int chain;
    a = va; b = vb; c0 = ci;
    #1ns;
    exp = {1'b0, va} + {1'b0, vb} + {{N{1'b0}}, ci};
    checks++;
    if ({c32, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h c0=%b got c32=%b sum=%h exp c32=%b sum=%h",
               va, vb, ci, c32, sum, exp[N], exp[N-1:0]);
    end
    exp_nocin = {1'b0, va} + {1'b0, vb};
    if (ci && exp != exp_nocin) n_cin_used++;
    if (exp[N]) n_cout++;
    if (ci && (va ^ vb) == '1) n_full_prop++;
    chain = longest_chain(va, vb, ci);
    for (int l = 1; l <= LEVELS; l++)
      if (chain > (1 << (l - 1)) && chain <= (1 << l)) n_level[l]++;
  endtask

  initial begin
    logic [N-1:0] va, vb;
    foreach (n_level[l]) n_level[l] = 0;

    // Reference vector, with its printed result checked literally.
    apply(32'h56AA548A, 32'h6AAA5555, 1'b1);
    checks++;
    if (sum !== 32'hC154A9E0 || c32 !== 1'b0) begin
      failures++;
      $display("FAIL reference vector: sum=%h c32=%b", sum, c32);
    end

    // Carry chains of every length, started by a generate at bit 0 ...
    for (int len = 1; len <= N; len++) begin
      va = '0; vb = '0;
      va[0] = 1'b1; vb[0] = 1'b1;
      for (int i = 1; i < len; i++) va[i] = 1'b1;
      apply(va, vb, 1'b0);
      apply(vb, va, 1'b0);
    end
    // ... and entered through the carry-in.
    for (int len = 1; len <= N; len++) begin
      va = '0;
      for (int i = 0; i < len; i++) va[i] = 1'b1;
      apply(va, '0, 1'b1);
    end

    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('1, '1, 1'b0);
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);
    apply(32'h7FFF_FFFF, 32'h0000_0001, 1'b0);

    for (int k = 0; k < 20000; k++) apply($urandom, $urandom, 1'($urandom));

    $display("mechanisms: cin_used=%0d cout=%0d full_propagate=%0d",
             n_cin_used, n_cout, n_full_prop);
    for (int l = 1; l <= LEVELS; l++)
      $display("  chains needing tree level %0d: %0d", l, n_level[l]);
    checks++;
    if (n_cin_used == 0 || n_cout == 0 || n_full_prop == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    for (int l = 1; l <= LEVELS; l++) begin
      checks++;
      if (n_level[l] == 0) begin
        failures++;
        $display("FAIL no carry chain needed tree level %0d", l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
