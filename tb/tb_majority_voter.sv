// tb_majority_voter: exhaustive self-checking test of the majority voter.
// For all 16 vote patterns, UP must be high exactly when LATE votes
// outnumber EARLY votes and DN exactly when EARLY outnumber LATE, one clock
// after the votes are presented. Also checks the reset value.
module tb_majority_voter;
  timeunit 1ps;
  timeprecision 1fs;

  logic       clk = 0, rst_n = 0;
  logic [1:0] early, late;
  logic       up, dn;
  int checks = 0, failures = 0;

  majority_voter dut (.*);

  always #50 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    early = '0; late = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (up || dn) begin failures++; $display("FAIL reset"); end
    @(negedge clk) rst_n = 1;
    for (int v = 0; v < 16; v++) begin
      int ne, nl;
      @(negedge clk);
      {early, late} = 4'(v);
      ne = int'(early[0]) + int'(early[1]);
      nl = int'(late[0]) + int'(late[1]);
      @(posedge clk); #1;
      checks++;
      if (up !== (nl > ne) || dn !== (ne > nl)) begin
        failures++;
        $display("FAIL early=%b late=%b: up=%b dn=%b", early, late, up, dn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
