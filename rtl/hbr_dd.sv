// hbr_dd: quarter-rate data decoder of the 2x half-baud-rate receiver.
//
// Each of the two slices looks at the data comparators of one sampled UI
// (DH and DL at the edge, DM at the centre) and returns two bits: D_n, the
// sampled UI, and D_{n-1}, the UI before it that no comparator sampled. The
// edge sample works like a one-tap speculative DFE: an edge sample above
// +Vref or below -Vref means both bits are equal; one in between means a
// transition, so D_{n-1} is the complement of D_n. The table is
// hbr_pkg::dd_decode. With 6 inputs and 4 outputs per clock, the block
// delivers four bits per quarter-rate clock.
//
// Output order (this implementation's choice): data[0] is the oldest bit,
// i.e. data = {D_n(slice1), D_n-1(slice1), D_n(slice0), D_n-1(slice0)}.
// Outputs are registered once on clk (the source design flops its decoder
// outputs); reset value 0.
module hbr_dd
  import hbr_pkg::*;
#(
  parameter int SLICES = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [SLICES-1:0]   dh,
  input  logic [SLICES-1:0]   dl,
  input  logic [SLICES-1:0]   dm,
  output logic [2*SLICES-1:0] data
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [2*SLICES-1:0] data_c;

  always_comb begin
    for (int i = 0; i < SLICES; i++) begin
      dd_bits_s b;
      b = dd_decode(dh[i], dl[i], dm[i]);
      data_c[2*i]   = b.d_nm1;
      data_c[2*i+1] = b.d_n;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) data <= '0;
    else        data <= data_c;
  end

endmodule
