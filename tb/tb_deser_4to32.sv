// tb_deser_4to32: self-checking test of the 4:32 deserializer. A random
// nibble stream is fed one nibble per clock; every eighth clock dout must
// hold the last eight nibbles with the oldest in bits 3:0, dout_valid must
// pulse exactly then (rate 1/8), and dout must stay unchanged in between.
module tb_deser_4to32;
  timeunit 1ps;
  timeprecision 1fs;

  logic        clk = 0, rst_n = 0;
  logic [3:0]  din;
  logic [31:0] dout;
  logic        dout_valid;
  int checks = 0, failures = 0;

  deser_4to32 dut (.*);

  always #50 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] hist[$];

  initial begin
    int n_valid, cyc, last_valid;
    logic [31:0] expw, held;
    n_valid = 0; cyc = 0; last_valid = -1;
    din = '0;
    repeat (2) @(posedge clk);
    held = '0;
    for (int k = 0; k < 8 * 40; k++) begin
      @(negedge clk);
      rst_n = 1;  // released together with the first nibble
      din = 4'($urandom);
      hist.push_back(din);
      @(posedge clk); #1;
      cyc++;
      if (dout_valid) begin
        n_valid++;
        for (int j = 0; j < 8; j++) expw[4*j +: 4] = hist[hist.size() - 8 + j];
        checks++;
        if (dout !== expw) begin
          failures++; $display("FAIL word %0d: %h exp %h", n_valid, dout, expw);
        end
        if (last_valid >= 0) begin
          checks++;
          if (cyc - last_valid != 8) begin failures++; $display("FAIL valid spacing %0d", cyc - last_valid); end
        end
        last_valid = cyc;
        held = dout;
      end else if (n_valid > 0) begin
        checks++;
        if (dout !== held) begin failures++; $display("FAIL dout changed without valid"); end
      end
    end
    checks++;
    if (n_valid != 40) begin failures++; $display("FAIL %0d words", n_valid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
