// deser_4to32: 4-to-32 deserializer between the data decoder and the BERT.
//
// The decoder delivers IN_W bits per quarter-rate clock; this block shifts
// them into a register and, every OUT_W/IN_W clocks, copies the assembled
// word into the output register, where it stays stable for the next
// OUT_W/IN_W clocks so that a clock divided by OUT_W/IN_W (CK/8) can read it
// in the middle of that window. The 4:32 ratio follows the source design;
// the shift-register structure is this implementation's choice.
//
// Bit order: din[0] and dout[0] are the oldest bits. dout_valid pulses for
// one clk cycle in the cycle dout changes. The word boundary is set by reset.
module deser_4to32 #(
  parameter int IN_W  = 4,
  parameter int OUT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IN_W-1:0]  din,
  output logic [OUT_W-1:0] dout,
  output logic             dout_valid
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int RATIO = OUT_W / IN_W;
  localparam int CW    = (RATIO > 1) ? $clog2(RATIO) : 1;

  logic [OUT_W-IN_W-1:0] sr;
  logic [OUT_W-1:0]      sr_next;
  logic [CW-1:0]    cnt;

  assign sr_next = {din, sr};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr         <= '0;
      cnt        <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      sr         <= sr_next[OUT_W-1:IN_W];
      dout_valid <= 1'b0;
      if (cnt == CW'(RATIO - 1)) begin
        cnt        <= '0;
        dout       <= sr_next;
        dout_valid <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  initial assert (OUT_W % IN_W == 0);

endmodule
