// tb_quat_driver: exhaustive self-checking test of the quaternary input driver.
// For each of the four input levels it checks that exactly select line k = level is
// high and that every complementary line is the inverse of its select line.
module tb_quat_driver;
  import quat_pkg::*;

  quat_t              digit;
  logic [NLEVELS-1:0] sel, sel_n;
  int checks = 0, failures = 0;

  quat_driver dut (.digit(digit), .sel(sel), .sel_n(sel_n));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 4; d++) begin
      digit = quat_t'(d);
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (sel[k] !== (k == d) || sel_n[k] !== (k != d)) begin
          failures++;
          $display("FAIL digit=%0d line %0d: sel=%b sel_n=%b", d, k, sel[k], sel_n[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
