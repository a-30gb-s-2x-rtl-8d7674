// tb_cp_lf: self-checking test of the charge-pump / loop-filter model with
// its default values (100 uA, 50 ohm, 400 pF, start at 0.2 V). Checks the
// proportional step I*R when pumping starts and stops, the integral slope
// I/C over a pumping interval, that up and dn together cancel, and the
// clamping at 0 V and 0.9 V.
module tb_cp_lf;
  timeunit 1ps;
  timeprecision 1fs;

  logic up = 0, dn = 0;
  real  vctrl;
  int checks = 0, failures = 0;

  cp_lf dut (.up(up), .dn(dn), .vctrl(vctrl));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic near(input real a, input real b, input string msg);
    checks++;
    if (a < b - 1.0e-6 || a > b + 1.0e-6) begin
      failures++; $display("FAIL %s: %f exp %f", msg, a, b);
    end
  endtask

  initial begin
    real v0;
    #10.5;
    near(vctrl, 0.2, "initial");
    up = 1;
    #1000;
    // 1000 ps at 100 uA into 400 pF = 0.25 mV, plus 5 mV across 50 ohm
    near(vctrl, 0.2 + 0.00025 + 0.005, "up 1 ns");
    up = 0;
    #10;
    near(vctrl, 0.2 + 0.00025, "after up");
    v0 = vctrl;
    up = 1; dn = 1;
    #1000;
    near(vctrl, v0, "up and dn cancel");
    up = 0;
    #2000;
    near(vctrl, v0 - 0.0005 - 0.005, "dn 2 ns");
    // long dn pumping clamps at 0
    #3000000;
    near(vctrl, 0.0, "clamp low");
    dn = 0; up = 1;
    #5000000;
    near(vctrl, 0.9, "clamp high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
