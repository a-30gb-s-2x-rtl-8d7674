// tb_hbr_dd: exhaustive self-checking test of the quarter-rate data decoder.
// The four legal comparator patterns are checked against the decoder table
// of the scheme, (DH,DL,DM) -> (D_n-1, D_n): 000->(0,0), 010->(1,0),
// 011->(0,1), 111->(1,1); the four illegal patterns against this
// implementation's fallback (D_n = DM; D_n-1 = DL if DH == DL, else not DM).
// Also checks output order (bit 0 oldest), reset value and one-clock latency.
module tb_hbr_dd;
  timeunit 1ps;
  timeprecision 1fs;

  logic       clk = 0, rst_n = 0;
  logic [1:0] dh, dl, dm;
  logic [3:0] data;
  int checks = 0, failures = 0;

  hbr_dd dut (.*);

  always #50 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // returns {D_n, D_n-1}
  function automatic logic [1:0] ref_dd(logic h, logic l, logic m);
    case ({h, l, m})
      3'b000: return 2'b00;
      3'b010: return 2'b01;
      3'b011: return 2'b10;
      3'b111: return 2'b11;
      3'b001: return 2'b10;  // DH==DL=0: D_n-1=0, D_n=1
      3'b110: return 2'b01;  // DH==DL=1: D_n-1=1, D_n=0
      default: return {m, ~m};  // DH=1, DL=0: transition assumed
    endcase
  endfunction

  initial begin
    {dh, dl, dm} = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (data !== 4'b0) begin failures++; $display("FAIL reset value"); end
    @(negedge clk) rst_n = 1;
    for (int v = 0; v < 64; v++) begin
      @(negedge clk);
      {dh, dl, dm} = 6'(v);
      @(posedge clk); #1;
      for (int s = 0; s < 2; s++) begin
        logic [1:0] exp_v;
        exp_v = ref_dd(dh[s], dl[s], dm[s]);
        checks++;
        if (data[2*s+1 -: 2] !== exp_v) begin
          failures++;
          $display("FAIL v=%0h slice %0d: {Dn,Dn-1}=%b exp %b", v, s, data[2*s+1 -: 2], exp_v);
        end
      end
    end
    // latency
    @(negedge clk); {dh, dl, dm} = 6'b00_00_00;
    @(posedge clk); #1;
    @(negedge clk); {dh, dl, dm} = 6'b11_11_11;
    #10; checks++;
    if (data !== 4'b0000) begin failures++; $display("FAIL latency"); end
    @(posedge clk); #1; checks++;
    if (data !== 4'b1111) begin failures++; $display("FAIL latency 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
