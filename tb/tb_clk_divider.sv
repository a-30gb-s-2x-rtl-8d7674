// tb_clk_divider: self-checking test of the even clock divider at the two
// ratios the receiver uses, 8 (CK/8) and 2 (CK/16 from CK/8). For each
// output it checks the period and the 50% duty cycle in input clock cycles,
// and that the output is 0 after reset.
module tb_clk_divider;
  timeunit 1ps;
  timeprecision 1fs;

  logic clk = 0, rst_n = 0;
  logic ck8, ck16;
  int checks = 0, failures = 0;

  clk_divider #(.DIV(8)) dut8 (.clk(clk), .rst_n(rst_n), .clk_div(ck8));
  clk_divider #(.DIV(2)) dut2 (.clk(ck8), .rst_n(rst_n), .clk_div(ck16));

  always #50 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc = 0;
    int r8[$], f8[$], r16[$];
    logic p8, p16;
    repeat (3) @(posedge clk);
    checks++;
    if (ck8 !== 1'b0 || ck16 !== 1'b0) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1;
    p8 = ck8; p16 = ck16;
    repeat (200) begin
      @(posedge clk); #1; cyc++;
      if (ck8 && !p8) r8.push_back(cyc);
      if (!ck8 && p8) f8.push_back(cyc);
      if (ck16 && !p16) r16.push_back(cyc);
      p8 = ck8; p16 = ck16;
    end
    checks++;
    if (r8.size() < 10 || r16.size() < 5) begin failures++; $display("FAIL too few edges"); end
    checks++;
    if (r8.size() > 0 && r8[0] != 4) begin failures++; $display("FAIL first ck8 rise at %0d", r8[0]); end
    for (int i = 1; i < r8.size(); i++) begin
      checks++;
      if (r8[i] - r8[i-1] != 8) begin failures++; $display("FAIL ck8 period %0d", r8[i] - r8[i-1]); end
    end
    for (int i = 0; i < r8.size() && i < f8.size(); i++) begin
      checks++;
      if (f8[i] - r8[i] != 4) begin failures++; $display("FAIL ck8 duty"); end
    end
    for (int i = 1; i < r16.size(); i++) begin
      checks++;
      if (r16[i] - r16[i-1] != 16) begin failures++; $display("FAIL ck16 period %0d", r16[i] - r16[i-1]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
