// prbs_bert: parallel, self-synchronising PRBS checker (bit error rate tester).
//
// The receiver's deserialized data arrive as W-bit words, one per CK/8 clock.
// The checker treats the previous word and the current word as one 2W-bit
// stretch of the serial stream (bit 0 oldest) and predicts every bit of the
// current word from the received bits TAP_A and TAP_B positions earlier:
// PRBS7 (x^7 + x^6 + 1) uses 7 and 6, PRBS31 (x^31 + x^28 + 1) uses 31 and
// 28. All W paths are checked in parallel, so the checker needs no word
// alignment and locks to any phase of the pattern. Because predictions use
// received bits, one bit error on the line is counted three times (once as
// itself and once in each of the two later predictions that use it).
//
// The source design only says that a synthesized 32-bit BERT validates the
// PRBS pattern and flags ERR; the polynomials are the usual ITU-T ones and
// the counters are this implementation's additions.
//
// Timing: din is taken on every rising clk edge. The first word after reset
// or after a change of prbs31 only fills the history. From the second word
// on, err is high for one clock after a word with at least one mismatch, and
// err_count (saturating) and bit_count advance by the mismatches and W.
module prbs_bert #(
  parameter int W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         prbs31,
  input  logic [W-1:0] din,
  output logic         err,
  output logic [31:0]  err_count,
  output logic [47:0]  bit_count
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [W-1:0]     prev;
  logic [2*W-1:0]   stream;
  logic [W-1:0]     mism;
  logic [$clog2(W+1)-1:0] n_mism;
  logic             primed;
  logic             mode_q;

  assign stream = {din, prev};

  always_comb begin
    n_mism = '0;
    for (int i = 0; i < W; i++) begin
      logic pred;
      if (prbs31) pred = stream[W + i - 31] ^ stream[W + i - 28];
      else        pred = stream[W + i - 7]  ^ stream[W + i - 6];
      mism[i] = pred ^ din[i];
      n_mism += ($clog2(W+1))'(mism[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev      <= '0;
      primed    <= 1'b0;
      mode_q    <= 1'b0;
      err       <= 1'b0;
      err_count <= '0;
      bit_count <= '0;
    end else begin
      prev   <= din;
      mode_q <= prbs31;
      if (mode_q != prbs31) begin
        primed <= 1'b0;
        err    <= 1'b0;
      end else if (!primed) begin
        primed <= 1'b1;
        err    <= 1'b0;
      end else begin
        err       <= (n_mism != 0);
        bit_count <= bit_count + 48'(W);
        if (err_count > 32'hFFFF_FFFF - 32'(n_mism)) err_count <= 32'hFFFF_FFFF;
        else                                          err_count <= err_count + 32'(n_mism);
      end
    end
  end

  initial assert (W >= 31);

endmodule
