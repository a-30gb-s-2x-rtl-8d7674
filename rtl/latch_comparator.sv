// latch_comparator: behavioural model of one clocked (double-tail latch)
// comparator of the receiver front end. Not synthesizable: it compares
// real-valued voltages and uses a delay.
//
// On each rising edge of its clock phase the comparator decides whether the
// equalizer output vin, plus an input-referred offset, is above the
// threshold vref, and after CLK_TO_Q_PS picoseconds presents the decision on
// q, where it stays until the next rising edge (the set-reset latch behind a
// real double-tail comparator). Eight of them sample the signal in the
// receiver: three at each edge phase (+Vref, 0, -Vref) and one at each centre
// phase (0). Offset and delay are model parameters, not values of the source
// design; q starts at 0.
module latch_comparator #(
  parameter real OFFSET      = 0.0,
  parameter real CLK_TO_Q_PS = 5.0
) (
  input  logic clk,
  input  real  vin,
  input  real  vref,
  output logic q
);
  timeunit 1ps;
  timeprecision 1fs;

  initial q = 1'b0;

  always @(posedge clk) begin
    q <= #(CLK_TO_Q_PS) ((vin + OFFSET) > vref);
  end

endmodule
