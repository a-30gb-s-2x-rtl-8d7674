// tb_prbs_bert: self-checking test of the parallel PRBS checker.
// The testbench builds PRBS7 (x^7+x^6+1) and PRBS31 (x^31+x^28+1) streams
// with its own serial LFSR, packs them 32 bits per word (bit 0 first in
// time) and checks that:
//   - clean PRBS7 and PRBS31 streams give no errors, with err low and
//     bit_count advancing by 32 per checked word;
//   - one flipped line bit is counted exactly three times and raises err;
//   - a PRBS7 stream checked in PRBS31 mode gives errors (mode switch);
//   - the first word after reset or a mode switch is not checked.
module tb_prbs_bert;
  timeunit 1ps;
  timeprecision 1fs;

  logic        clk = 0, rst_n = 0, prbs31 = 0;
  logic [31:0] din = '0;
  logic        err;
  logic [31:0] err_count;
  logic [47:0] bit_count;
  int checks = 0, failures = 0;

  prbs_bert dut (.*);

  always #500 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [30:0] lfsr = 31'h1234_5678;
  logic        mode31 = 0;

  function automatic logic next_bit();
    logic b;
    if (mode31) b = lfsr[30] ^ lfsr[27];  // s[n-31] ^ s[n-28]
    else        b = lfsr[6] ^ lfsr[5];    // s[n-7]  ^ s[n-6]
    lfsr = {lfsr[29:0], b};
    return b;
  endfunction

  function automatic logic [31:0] next_word();
    logic [31:0] w;
    for (int i = 0; i < 32; i++) w[i] = next_bit();
    return w;
  endfunction

  task automatic send(input logic [31:0] w);
    @(negedge clk) din = w;
    @(posedge clk); #1;
  endtask

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    logic [31:0] e0;
    logic [47:0] b0;
    repeat (2) @(posedge clk);
    // PRBS7, clean; the first word is presented with the reset release
    @(negedge clk) begin rst_n = 1; din = next_word(); end
    @(posedge clk); #1;
    check(bit_count == 0 && err_count == 0, "first word must only prime");
    for (int k = 0; k < 50; k++) begin
      b0 = bit_count;
      send(next_word());
      check(err == 0, "PRBS7 clean: err");
      check(bit_count == b0 + 32, "bit_count rate");
    end
    check(err_count == 0, "PRBS7 clean count");
    // single line error
    e0 = err_count;
    begin
      logic [31:0] w;
      w = next_word();
      w[13] = ~w[13];
      send(w);
      check(err == 1, "err after flipped bit");
    end
    for (int k = 0; k < 5; k++) send(next_word());
    check(err_count == e0 + 3, $sformatf("flipped bit counted %0d times", err_count - e0));
    check(err == 0, "err clears");
    // PRBS7 data checked as PRBS31: must fail
    prbs31 = 1;
    e0 = err_count;
    send(next_word());
    check(err == 0 && err_count == e0, "mode switch re-primes");
    for (int k = 0; k < 10; k++) send(next_word());
    check(err_count > e0 + 50, "PRBS7 in PRBS31 mode detected");
    // PRBS31, clean
    mode31 = 1;
    send(next_word());
    send(next_word());
    e0 = err_count;
    for (int k = 0; k < 100; k++) begin
      send(next_word());
      check(err == 0, "PRBS31 clean: err");
    end
    check(err_count == e0, "PRBS31 clean count");
    // PRBS31 single error
    begin
      logic [31:0] w;
      w = next_word();
      w[31] = ~w[31];
      send(w);
    end
    for (int k = 0; k < 5; k++) send(next_word());
    check(err_count == e0 + 3, $sformatf("PRBS31 flipped bit counted %0d times", err_count - e0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
