// tb_tx_channel: testbench source for the receiver: PRBS transmitter plus an
// equalized channel, as a real-valued waveform.
//
// Bits come from a serial LFSR, PRBS7 (x^7+x^6+1) or PRBS31 (x^31+x^28+1)
// selected by mode31, at 30 Gb/s * (1 + PPM*1e-6). The waveform keeps one
// post-cursor: at the centre of bit k it is y_k = b_k + ALPHA*b_(k-1)
// (b = +/-1), linearly interpolated in between, and it is updated every
// STEP_PS. Optional sinusoidal jitter shifts the bit time by
// SJ_UIPP/2 * sin(2*pi*SJ_MHZ*t) UI.
module tb_tx_channel #(
  parameter real PPM     = 0.0,
  parameter real ALPHA   = 0.33,
  parameter real STEP_PS = 0.5,
  parameter real SJ_UIPP = 0.0,
  parameter real SJ_MHZ  = 1.0
) (
  input  logic mode31,
  output real  vin
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam real UI_PS = 1000.0 / (30.0 * (1.0 + PPM * 1.0e-6));
  localparam real PI    = 3.14159265358979;
  localparam int  HN    = 64;

  logic [30:0] lfsr  = 31'h0000_0055;
  longint      gen_k = -1;
  logic        hist [HN];

  function automatic void gen_upto(longint k);
    while (gen_k < k) begin
      logic b;
      gen_k++;
      if (mode31) b = lfsr[30] ^ lfsr[27];
      else        b = lfsr[6] ^ lfsr[5];
      lfsr = {lfsr[29:0], b};
      hist[int'(gen_k % HN)] = b;
    end
  endfunction

  function automatic real cursor(longint k);
    real b0, b1;
    b0 = (k >= 0 && hist[int'(k % HN)]) ? 1.0 : -1.0;
    b1 = (k >= 1 && hist[int'((k - 1) % HN)]) ? 1.0 : -1.0;
    return b0 + ALPHA * b1;
  endfunction

  initial begin
    vin = 0.0;
    forever begin
      real u, fr, a, b, w, t;
      longint k;
      t  = $realtime;
      u  = t / UI_PS - 0.5 * SJ_UIPP * $sin(2.0 * PI * SJ_MHZ * 1.0e-6 * t);
      k  = longint'($floor(u));
      fr = u - $floor(u);
      gen_upto(k + 1);
      if (fr >= 0.5) begin a = cursor(k);     b = cursor(k + 1); w = fr - 0.5; end
      else           begin a = cursor(k - 1); b = cursor(k);     w = fr + 0.5; end
      vin = a + (b - a) * w;
      #(STEP_PS);
    end
  end

endmodule
