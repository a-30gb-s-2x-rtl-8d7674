// ring_vco: behavioural model of the four-stage differential ring VCO.
// Not synthesizable: it uses real arithmetic and delays.
//
// A four-stage differential ring gives eight clock phases 45 degrees apart:
// ck[0..3] are 0/45/90/135 degrees and ck[4..7] their inverses at
// 180/225/270/315 degrees. The model advances the ring by one stage every
// eighth of a period, toggling ck[k] and ck[k+4] in turn, and re-evaluates
// the frequency from vctrl at each stage, so frequency changes take effect
// within an eighth of a period without a phase step.
//
// Tuning (model choice): f = F_MIN_GHZ + KVCO_GHZ_PER_V * vctrl, clamped to
// the 6.5 to 11 GHz range of the source design. The gain is not given there.
// No phase noise is modelled. ck[0] rises at time 0.
module ring_vco #(
  parameter real F_MIN_GHZ      = 6.5,
  parameter real F_MAX_GHZ      = 11.0,
  parameter real KVCO_GHZ_PER_V = 5.0
) (
  input  real        vctrl,
  output logic [7:0] ck
);
  timeunit 1ps;
  timeprecision 1fs;

  function automatic real freq_ghz(real v);
    real f;
    f = F_MIN_GHZ + KVCO_GHZ_PER_V * v;
    if (f < F_MIN_GHZ) f = F_MIN_GHZ;
    if (f > F_MAX_GHZ) f = F_MAX_GHZ;
    return f;
  endfunction

  int stage;

  initial begin
    ck    = 8'hF0;
    stage = 0;
    forever begin
      ck[stage]     = ~ck[stage];
      ck[stage + 4] = ~ck[stage + 4];
      stage         = (stage + 1) % 4;
      #(1000.0 / (8.0 * freq_ghz(vctrl)));
    end
  end

endmodule
