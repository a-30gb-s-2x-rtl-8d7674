// tb_hbr_pd: exhaustive self-checking test of the quarter-rate phase
// detector. Every combination of the eight comparator inputs is applied; one
// clock later both slices' EARLY/LATE outputs are compared with the phase
// detector table written out here independently (transition at the edge when
// DH=0 and DL=1; then ED==DM is LATE, ED!=DM is EARLY; otherwise HOLD).
// Also checks the reset value and the one-clock latency.
module tb_hbr_pd;
  timeunit 1ps;
  timeprecision 1fs;

  logic       clk = 0, rst_n = 0;
  logic [1:0] dh, dl, ed, dm, early, late;
  int checks = 0, failures = 0;

  hbr_pd dut (.*);

  always #50 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] ref_pd(logic h, logic l, logic e, logic m);
    // returns {late, early}
    if (h == 1'b0 && l == 1'b1) return (e == m) ? 2'b10 : 2'b01;
    return 2'b00;
  endfunction

  initial begin
    {dh, dl, ed, dm} = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (early !== 2'b00 || late !== 2'b00) begin
      failures++; $display("FAIL reset value");
    end
    @(negedge clk) rst_n = 1;
    for (int v = 0; v < 256; v++) begin
      @(negedge clk);
      {dh, dl, ed, dm} = 8'(v);
      @(posedge clk); #1;
      for (int s = 0; s < 2; s++) begin
        logic [1:0] exp_v;
        exp_v = ref_pd(dh[s], dl[s], ed[s], dm[s]);
        checks++;
        if ({late[s], early[s]} !== exp_v) begin
          failures++;
          $display("FAIL v=%0h slice %0d: late/early=%b%b exp %b", v, s, late[s], early[s], exp_v);
        end
      end
    end
    // latency: output must not follow an input change before the clock edge
    @(negedge clk); {dh, dl, ed, dm} = 8'b00_11_00_00;   // both slices LATE
    @(posedge clk); #1;
    @(negedge clk); {dh, dl, ed, dm} = 8'b00_11_00_11;   // both slices EARLY
    #10; checks++;
    if (late !== 2'b11 || early !== 2'b00) begin failures++; $display("FAIL latency"); end
    @(posedge clk); #1; checks++;
    if (late !== 2'b00 || early !== 2'b11) begin failures++; $display("FAIL latency 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
