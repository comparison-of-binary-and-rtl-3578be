// tb_hybrid_comparator: end-to-end test of the hybrid (binary in, binary out) comparator
// at its default size, a 4-bit compare done as a 2-digit quaternary compare.
//
// All 256 pairs of 4-bit words are applied. For each, the binary outputs l/e/g and the
// quaternary status leg_q are checked against the integer comparison of the two words.
// The bench also counts how often each path through the design was taken and fails if
// one never was: each of the three results, a result decided by the most significant
// digit, a result passed through the cascade from the least significant digit (equal
// upper digits, unequal lower digits), and an all-equal result.
module tb_hybrid_comparator;
  import quat_pkg::*;

  logic [3:0] a, b;
  logic       l, e, g;
  quat_t      leg_q;
  int checks = 0, failures = 0;
  int n_lt = 0, n_eq = 0, n_gt = 0, n_msd = 0, n_lsd = 0;

  hybrid_comparator dut (.a(a), .b(b), .l(l), .e(e), .g(g), .leg_q(leg_q));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d: got %0d expected %0d", what, a, b, got, exp);
    end
  endtask

  task automatic require(string what, int count);
    checks++;
    $display("%-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int av = 0; av < 16; av++) begin
      for (int bv = 0; bv < 16; bv++) begin
        a = av[3:0];
        b = bv[3:0];
        #1;
        check("l", int'(l), int'(av < bv));
        check("e", int'(e), int'(av == bv));
        check("g", int'(g), int'(av > bv));
        check("leg_q", int'(leg_q), (av < bv) ? 1 : (av == bv) ? 2 : 3);
        if (av < bv) n_lt++;
        if (av == bv) n_eq++;
        if (av > bv) n_gt++;
        if (av / 4 != bv / 4) n_msd++;
        if (av / 4 == bv / 4 && av % 4 != bv % 4) n_lsd++;
      end
    end
    require("result A < B", n_lt);
    require("result A = B", n_eq);
    require("result A > B", n_gt);
    require("decided by upper digit", n_msd);
    require("passed from lower digit", n_lsd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
