// tb_hbr_cdr_capture: frequency capture and sinusoidal-jitter runs of the
// receiver at its default parameters.
//
// Four receivers run side by side, each fed by its own transmitter/channel
// (tb_tx_channel) with PRBS31 data:
//   0: -2300 ppm    1: +10000 ppm
//   2: 0 ppm with 0.3 UIpp sinusoidal jitter at 10 MHz
//   3: 0 ppm with 1.0 UIpp sinusoidal jitter at 1 MHz
// Each starts from the VCO's 7.5 GHz rest frequency. After an acquisition
// time every receiver must be locked: no BERT errors during the final
// window, and a mean CK/8 period equal to 32 transmitted UIs within 200 ppm
// (for the jitter case, the mean frequency is that of the clean data).
// The loop-filter and VCO-gain values are those of the behavioural models,
// not measured ones, so these runs show the mechanism (frequency acquisition
// by the phase detector alone, and tracking of jitter), not the measured
// limits.
module tb_hbr_cdr_capture;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  N = 4;
  localparam real PPMS [N] = '{-2300.0, 10000.0, 0.0, 0.0};
  localparam real SJS  [N] = '{0.0, 0.0, 0.3, 1.0};
  localparam real SJF  [N] = '{1.0, 1.0, 10.0, 1.0};

  logic rst_n = 0;
  logic mode31 = 1;
  real  vref = 0.6;
  real  vin [N];
  real  vctrl [N];
  logic [N-1:0] err, ck8, ck16;
  logic [31:0]  err_count [N];
  logic [31:0]  rx_word [N];
  logic [47:0]  bit_count [N];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < N; i++) begin : g_rx
    tb_tx_channel #(.PPM(PPMS[i]), .SJ_UIPP(SJS[i]), .SJ_MHZ(SJF[i]))
      u_tx (.mode31(mode31), .vin(vin[i]));
    hbr_cdr_rx dut (
      .rst_n(rst_n), .vin(vin[i]), .vref(vref), .prbs31(1'b1),
      .err(err[i]), .err_count(err_count[i]), .bit_count(bit_count[i]),
      .rx_word(rx_word[i]), .ck8(ck8[i]), .ck16(ck16[i]), .vctrl(vctrl[i])
    );
  end

  initial begin
    #6000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit  meas_on = 0;
  int  n8 [N] = '{default: 0};
  real t8_first [N] = '{default: 0.0};
  real t8_last [N] = '{default: 0.0};
  for (genvar i = 0; i < N; i++) begin : g_meas
    always @(posedge ck8[i]) if (meas_on) begin
      if (n8[i] == 0) t8_first[i] = $realtime;
      t8_last[i] = $realtime;
      n8[i]++;
    end
  end

  initial begin
    logic [31:0] e0 [N];
    logic [47:0] b0 [N];
    #5000 rst_n = 1;
    #1500000;
    for (int i = 0; i < N; i++) begin e0[i] = err_count[i]; b0[i] = bit_count[i]; end
    meas_on = 1;
    #500000;
    meas_on = 0;
    for (int i = 0; i < N; i++) begin
      real per, exp_per, ppm_err;
      exp_per = 32.0 * 1000.0 / (30.0 * (1.0 + PPMS[i] * 1.0e-6));
      per     = (t8_last[i] - t8_first[i]) / real'(n8[i] - 1);
      ppm_err = (per - exp_per) / exp_per * 1.0e6;
      $display("rx %0d: offset %0.0f ppm, vctrl %f V, CK/8 error %0.1f ppm, %0d errors in %0d bits",
               i, PPMS[i], vctrl[i], ppm_err, err_count[i] - e0[i], bit_count[i] - b0[i]);
      checks++;
      if (err_count[i] != e0[i] || bit_count[i] - b0[i] < 48'd10000) begin
        failures++; $display("FAIL rx %0d not error-free", i);
      end
      checks++;
      if (ppm_err > 200.0 || ppm_err < -200.0) begin
        failures++; $display("FAIL rx %0d not frequency-locked", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
