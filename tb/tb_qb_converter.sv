// tb_qb_converter: exhaustive self-checking test of the quaternary-to-binary status
// converter: level 1 must raise only l, level 2 only e, level 3 only g, and level 0
// none of them.
module tb_qb_converter;
  import quat_pkg::*;

  quat_t leg_q;
  logic  l, e, g;
  int checks = 0, failures = 0;

  qb_converter dut (.leg_q(leg_q), .l(l), .e(e), .g(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      leg_q = quat_t'(v);
      #1;
      checks++;
      if ({l, e, g} !== {v == 1, v == 2, v == 3}) begin
        failures++;
        $display("FAIL level %0d: l=%b e=%b g=%b", v, l, e, g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
