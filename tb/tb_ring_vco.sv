// tb_ring_vco: self-checking test of the ring VCO model. For several control
// voltages it measures the period of ck[0] against 1/(6.5 GHz + 5 GHz/V *
// vctrl), clamped to 6.5..11 GHz, and checks that ck[k] rises k/8 of a
// period after ck[0] for k = 1..7 (45-degree spacing) and that ck[k+4] is
// the inverse of ck[k].
module tb_ring_vco;
  timeunit 1ps;
  timeprecision 1fs;

  real        vctrl;
  logic [7:0] ck;
  int checks = 0, failures = 0;

  ring_vco dut (.vctrl(vctrl), .ck(ck));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real expected_ghz(real v);
    real f;
    f = 6.5 + 5.0 * v;
    if (f < 6.5) f = 6.5;
    if (f > 11.0) f = 11.0;
    return f;
  endfunction

  initial begin
    real vs[5] = '{0.2, 0.0, 0.5, 1.5, -0.3};
    foreach (vs[i]) begin
      real t0, t1, per, exp_per;
      vctrl = vs[i];
      repeat (3) @(posedge ck[0]);     // settle
      t0 = $realtime;
      for (int k = 1; k < 8; k++) begin
        real tk;
        @(posedge ck[k]);
        tk = $realtime - t0;
        exp_per = 1000.0 / expected_ghz(vs[i]);
        checks++;
        if (tk < k * exp_per / 8.0 - 0.01 || tk > k * exp_per / 8.0 + 0.01) begin
          failures++; $display("FAIL v=%f phase %0d at %f ps, exp %f", vs[i], k, tk, k * exp_per / 8.0);
        end
        checks++;
        if (ck[k] == ck[(k + 4) % 8]) begin failures++; $display("FAIL ck%0d not inverse", k); end
      end
      @(posedge ck[0]);
      t1 = $realtime;
      per = t1 - t0;
      exp_per = 1000.0 / expected_ghz(vs[i]);
      checks++;
      if (per < exp_per - 0.01 || per > exp_per + 0.01) begin
        failures++; $display("FAIL v=%f period %f exp %f", vs[i], per, exp_per);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
