// clk_divider: divides a clock by an even ratio DIV with 50% duty cycle.
//
// The source design divides the recovered quarter-rate clock by 8 (CK/8,
// the deserializer word clock and BERT clock) and that again by 2 (CK/16,
// brought out for measurement). Here a counter toggles the output every
// DIV/2 input cycles. After reset the output is 0 and its first rising edge
// follows the DIV/2-th rising edge of clk.
module clk_divider #(
  parameter int DIV = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_div
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int HALF = DIV / 2;
  localparam int CW   = (HALF > 1) ? $clog2(HALF) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      clk_div <= 1'b0;
    end else if (cnt == CW'(HALF - 1)) begin
      cnt     <= '0;
      clk_div <= ~clk_div;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  initial assert (DIV >= 2 && DIV % 2 == 0);

endmodule
