// hbr_cdr_rx: quarter-rate 30 Gb/s receiver with 2x half-baud-rate clock and
// data recovery.
//
// Idea: a bang-bang (Alexander) detector samples every UI twice, at its edge
// and at its centre. This receiver samples only every other UI, but there
// with four comparators: three at the edge (thresholds +Vref, 0, -Vref) and
// one at the centre (0). The two extra edge comparators let the data decoder
// recover the skipped UI from the post-cursor ISI at the following edge, and
// the edge/centre pair still lets the phase detector lock to the data edge.
// On average that is two comparisons per UI and half the clock phases of an
// Alexander detector.
//
// Structure (quarter rate, one VCO period = 4 UIs, two of them sampled):
//   ring_vco (8 phases) -> 8 latch_comparators on 0/45/180/225 degrees
//   -> hbr_pd (2 slices) -> majority_voter -> cp_lf -> back to the VCO
//   -> hbr_dd (2 slices, 4 bits/clock) -> deser_4to32 -> prbs_bert (CK/8)
//   clk_divider /8 gives CK/8, a further /2 gives the CK/16 test output.
// Slice 0: edge comparators on CK0 (0 deg), centre on CK45; slice 1: edge on
// CK180, centre on CK225, as in the source design. The VCO, comparators and
// charge pump/loop filter are behavioural models; the equalizer (CTLE) and
// the reference DAC are not modelled, so their outputs vin and vref are
// inputs here.
//
// Clocking (this implementation's choice): all digital logic runs on the
// 270-degree phase, when the decisions made at 0, 45, 180 and 225 degrees of
// the same period have all settled. rx_word changes once per 8 clocks and is
// read by the BERT on CK/8, half a word period later.
// Latency from the sampled UI to the charge pump: comparator, PD register,
// voter register (two 270-degree edges).
module hbr_cdr_rx (
  input  logic        rst_n,
  input  real         vin,
  input  real         vref,
  input  logic        prbs31,
  output logic        err,
  output logic [31:0] err_count,
  output logic [47:0] bit_count,
  output logic [31:0] rx_word,
  output logic        ck8,
  output logic        ck16,
  output real         vctrl
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [7:0] ck;       // ck[k]: k*45 degree phase
  logic       clk_dig;  // retiming clock of the digital logic

  logic [1:0] dh, dl, ed, dm;
  logic [1:0] early, late;
  logic       up, dn;
  logic [3:0] dd_data;
  logic       rx_word_valid;

  real vref_neg;
  real vzero;
  assign vref_neg = -vref;
  assign vzero    = 0.0;

  assign clk_dig = ck[6];

  // ---- clock generation and recovery loop --------------------------------
  ring_vco u_vco (
    .vctrl (vctrl),
    .ck    (ck)
  );

  cp_lf u_cp_lf (
    .up    (up),
    .dn    (dn),
    .vctrl (vctrl)
  );

  // ---- comparators: slice s uses edge phase ck[4*s], centre ck[4*s+1] ----
  for (genvar s = 0; s < 2; s++) begin : g_slice
    latch_comparator u_cmp_dh (.clk(ck[4*s]),   .vin(vin), .vref(vref),     .q(dh[s]));
    latch_comparator u_cmp_ed (.clk(ck[4*s]),   .vin(vin), .vref(vzero),    .q(ed[s]));
    latch_comparator u_cmp_dl (.clk(ck[4*s]),   .vin(vin), .vref(vref_neg), .q(dl[s]));
    latch_comparator u_cmp_dm (.clk(ck[4*s+1]), .vin(vin), .vref(vzero),    .q(dm[s]));
  end

  // ---- phase detection ---------------------------------------------------
  hbr_pd u_pd (
    .clk   (clk_dig),
    .rst_n (rst_n),
    .dh    (dh),
    .dl    (dl),
    .ed    (ed),
    .dm    (dm),
    .early (early),
    .late  (late)
  );

  majority_voter u_mv (
    .clk   (clk_dig),
    .rst_n (rst_n),
    .early (early),
    .late  (late),
    .up    (up),
    .dn    (dn)
  );

  // ---- data path ---------------------------------------------------------
  hbr_dd u_dd (
    .clk   (clk_dig),
    .rst_n (rst_n),
    .dh    (dh),
    .dl    (dl),
    .dm    (dm),
    .data  (dd_data)
  );

  deser_4to32 u_des (
    .clk        (clk_dig),
    .rst_n      (rst_n),
    .din        (dd_data),
    .dout       (rx_word),
    .dout_valid (rx_word_valid)
  );

  clk_divider #(.DIV(8)) u_div8 (
    .clk     (clk_dig),
    .rst_n   (rst_n),
    .clk_div (ck8)
  );

  clk_divider #(.DIV(2)) u_div2 (
    .clk     (ck8),
    .rst_n   (rst_n),
    .clk_div (ck16)
  );

  prbs_bert #(.W(32)) u_bert (
    .clk       (ck8),
    .rst_n     (rst_n),
    .prbs31    (prbs31),
    .din       (rx_word),
    .err       (err),
    .err_count (err_count),
    .bit_count (bit_count)
  );

endmodule
