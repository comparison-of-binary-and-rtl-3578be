// tb_quat_comparator: exhaustive self-checking test of the quaternary word comparator.
// The two-digit comparator (default) is driven with all 256 pairs of words and a
// three-digit instance with all 4096 pairs. The overall status is checked against the
// integer comparison of the word values, and each per-digit status against the
// comparison of that digit pair (1 L, 2 E, 3 G).
module tb_quat_comparator;
  import quat_pkg::*;

  function automatic int cmp_ref(int a, int b);
    return (a < b) ? 1 : (a == b) ? 2 : 3;
  endfunction

  quat_t [1:0] a2, b2, dl2;
  quat_t [2:0] a3, b3, dl3;
  quat_t leg2, leg3;
  int checks = 0, failures = 0;

  quat_comparator                dut2 (.a(a2), .b(b2), .digit_leg(dl2), .leg(leg2));
  quat_comparator #(.DIGITS(3))  dut3 (.a(a3), .b(b3), .digit_leg(dl3), .leg(leg3));

  task automatic check(string what, int av, int bv, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s A=%0d B=%0d: got %0d expected %0d", what, av, bv, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int av = 0; av < 16; av++) begin
      for (int bv = 0; bv < 16; bv++) begin
        a2 = av[3:0];
        b2 = bv[3:0];
        #1;
        check("2-digit leg", av, bv, int'(leg2), cmp_ref(av, bv));
        check("2-digit lsd", av, bv, int'(dl2[0]), cmp_ref(av % 4, bv % 4));
        check("2-digit msd", av, bv, int'(dl2[1]), cmp_ref(av / 4, bv / 4));
      end
    end
    for (int av = 0; av < 64; av++) begin
      for (int bv = 0; bv < 64; bv++) begin
        a3 = av[5:0];
        b3 = bv[5:0];
        #1;
        check("3-digit leg", av, bv, int'(leg3), cmp_ref(av, bv));
        check("3-digit digit2", av, bv, int'(dl3[2]), cmp_ref(av / 16, bv / 16));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
