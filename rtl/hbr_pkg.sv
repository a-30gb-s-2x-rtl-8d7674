// hbr_pkg: shared types and the per-slice decision logic of the 2x
// half-baud-rate clock and data recovery scheme.
//
// In the scheme one unit interval (UI) out of every two is sampled four
// times: at its leading edge by three comparators with thresholds +Vref (DH),
// 0 (ED) and -Vref (DL), and at its centre by one comparator at 0 (DM). The
// UI that follows is not sampled at all. Both functions below act on the four
// comparator decisions of one sampled UI (one "slice").
//
// pd_decide: when the edge sample lies between -Vref and +Vref (DH=0, DL=1)
// there was a transition at the edge, and ED is compared with DM like in a
// bang-bang (Alexander) detector: equal means the clock is LATE, different
// means EARLY. Any other pattern gives HOLD. This table follows the source
// design exactly.
//
// dd_decode: recovers D_n (the sampled UI) and D_{n-1} (the skipped UI before
// it). The four legal patterns follow the source design. For the four
// patterns it leaves open (a comparator offset or noise can produce them),
// this implementation takes D_n = DM and, when DH and DL agree, D_{n-1} = DL,
// otherwise D_{n-1} = not DM.
package hbr_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  typedef enum logic [1:0] {
    PD_HOLD  = 2'b00,
    PD_EARLY = 2'b01,
    PD_LATE  = 2'b10
  } pd_dec_e;

  // Comparator decisions of one sampled UI.
  typedef struct packed {
    logic dh;  // edge phase, threshold +Vref
    logic dl;  // edge phase, threshold -Vref
    logic ed;  // edge phase, threshold 0
    logic dm;  // centre phase, threshold 0
  } slice_s;

  // Recovered bits of one slice.
  typedef struct packed {
    logic d_n;    // sampled UI
    logic d_nm1;  // skipped UI before it
  } dd_bits_s;

  function automatic pd_dec_e pd_decide(slice_s s);
    if (!s.dh && s.dl) begin
      return (s.ed == s.dm) ? PD_LATE : PD_EARLY;
    end
    return PD_HOLD;
  endfunction

  // The decoder does not use ED.
  function automatic dd_bits_s dd_decode(logic dh, logic dl, logic dm);
    dd_bits_s b;
    b.d_n   = dm;
    b.d_nm1 = (dh == dl) ? dl : ~dm;
    return b;
  endfunction

endpackage
