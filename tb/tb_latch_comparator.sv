// tb_latch_comparator: self-checking test of the comparator model. A random
// voltage and threshold are applied before each clock edge and changed
// right after it; the decision must appear CLK_TO_Q_PS after the edge, match
// vin > vref at the edge, and hold until the next edge. A second instance
// with an input offset checks that the offset shifts the threshold.
module tb_latch_comparator;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 0;
  real  vin, vref;
  logic q, q_off;
  int checks = 0, failures = 0;

  latch_comparator #(.CLK_TO_Q_PS(5.0)) dut (.clk(clk), .vin(vin), .vref(vref), .q(q));
  latch_comparator #(.OFFSET(0.1), .CLK_TO_Q_PS(5.0)) dut_off (.clk(clk), .vin(vin), .vref(vref), .q(q_off));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vin = 0.0; vref = 0.0;
    for (int k = 0; k < 200; k++) begin
      logic exp_q, exp_off, q_before;
      real v, r;
      v = ($itor($urandom_range(2000)) - 1000.0) / 1000.0;
      r = ($itor($urandom_range(1200)) - 600.0) / 1000.0;
      vin = v; vref = r;
      exp_q   = (v > r);
      exp_off = (v + 0.1 > r);
      #20;
      q_before = q;
      clk = 1;
      #1;
      vin = -v;            // the model must use the value at the edge
      #2;
      checks++;
      if (q !== q_before) begin failures++; $display("FAIL q changed before clk-to-q"); end
      #4;
      checks++;
      if (q !== exp_q) begin failures++; $display("FAIL vin=%f vref=%f q=%b", v, r, q); end
      checks++;
      if (q_off !== exp_off) begin failures++; $display("FAIL offset vin=%f vref=%f q=%b", v, r, q_off); end
      #10 clk = 0;
      vin = 5.0 * (exp_q ? -1.0 : 1.0);
      #10;
      checks++;
      if (q !== exp_q) begin failures++; $display("FAIL q not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
