// majority_voter: combines the EARLY/LATE votes of the phase-detector slices
// into one charge-pump command per quarter-rate clock.
//
// The source design places a majority voter between the phase detector and
// the charge pump (4 lines in, 2 out) without giving its rule. This
// implementation counts the votes: more LATE than EARLY raises UP, more
// EARLY than LATE raises DN, and a tie (including all slices on HOLD) raises
// neither.
//
// Sign convention: LATE means the edge sample already shows the new bit, so
// the sampling clock lags the data and the VCO must run faster; EARLY means
// it leads and the VCO must run slower. UP increases the VCO control voltage.
//
// Outputs are registered (one clock of latency) and reset to neither.
module majority_voter #(
  parameter int SLICES = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [SLICES-1:0] early,
  input  logic [SLICES-1:0] late,
  output logic              up,
  output logic              dn
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int CW = $clog2(SLICES + 1);

  logic [CW-1:0] n_early, n_late;

  always_comb begin
    n_early = '0;
    n_late  = '0;
    for (int i = 0; i < SLICES; i++) begin
      n_early += CW'(early[i]);
      n_late  += CW'(late[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up <= 1'b0;
      dn <= 1'b0;
    end else begin
      up <= (n_late > n_early);
      dn <= (n_early > n_late);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(up && dn));

endmodule
