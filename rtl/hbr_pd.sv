// hbr_pd: quarter-rate 2x half-baud-rate phase detector.
//
// At quarter rate one clock period spans four UIs, of which two are sampled:
// slice 0 by the 0/45 degree phases and slice 1 by the 180/225 degree phases.
// Each slice applies the phase-detector table (hbr_pkg::pd_decide) to its
// DH, DL, ED and DM bits and produces one EARLY and one LATE line, so the
// block has 8 inputs and 4 outputs as in the source design. The decisions
// are registered once, as the source design flops the outputs of its
// detector logic to remove glitches.
//
// Timing: inputs must be stable at the rising edge of clk (the comparator
// decisions of one VCO period, retimed to one edge); early/late follow one
// clock later and are reset to HOLD (both 0). The reset value and the single
// common retiming clock are choices of this implementation.
module hbr_pd
  import hbr_pkg::*;
#(
  parameter int SLICES = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [SLICES-1:0] dh,
  input  logic [SLICES-1:0] dl,
  input  logic [SLICES-1:0] ed,
  input  logic [SLICES-1:0] dm,
  output logic [SLICES-1:0] early,
  output logic [SLICES-1:0] late
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [SLICES-1:0] early_c, late_c;

  always_comb begin
    for (int i = 0; i < SLICES; i++) begin
      pd_dec_e d;
      d = pd_decide('{dh: dh[i], dl: dl[i], ed: ed[i], dm: dm[i]});
      early_c[i] = (d == PD_EARLY);
      late_c[i]  = (d == PD_LATE);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      early <= '0;
      late  <= '0;
    end else begin
      early <= early_c;
      late  <= late_c;
    end
  end

  // A slice never reports both directions at once.
  assert property (@(posedge clk) disable iff (!rst_n) (early & late) == '0);

endmodule
