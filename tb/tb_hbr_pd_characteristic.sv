// tb_hbr_pd_characteristic: open-loop characteristic of the 2x
// half-baud-rate phase detector (hbr_pd) against sampling phase.
//
// For a set of channel and threshold conditions, the testbench sweeps the
// sampling phase phi from -0.5 to +0.5 UI around the data edge (phi = 0
// samples exactly at the nominal edge, the centre comparator half a UI
// later), computes the comparator decisions of 2000 sampled UIs of PRBS7
// data, feeds them two slices per clock into hbr_pd, and averages
// (LATE - EARLY) per sampled UI. The waveform has pulse response
// 1 + ALPHA z^-1 + BETA z^-2 at the bit centres, linear in between, plus
// Gaussian-like noise of sigma 0.05 so that the average is a smooth curve.
//
// Conditions: nominal (ALPHA 0.33, BETA 0, Vref 0.6); Vref offset by -0.05
// and +0.05; and the residual-ISI pairs (0.43, 0.13), (0.22, -0.18) and
// (0.17, -0.27). Checks:
//   - every condition has a stable zero crossing (EARLY below, LATE above)
//     within 0.25 UI of the data edge, i.e. the loop locks to the edge;
//   - nominal and Vref-offset conditions have no dead zone: 0.05 UI on
//     either side of that crossing the average is at least 0.02 in
//     magnitude.
// The residual-ISI conditions are only required to lock near the edge: with
// this piecewise-linear waveform their data-dependent crossings fall into
// separate clusters, and between clusters the average is close to zero
// (for ALPHA 0.43, BETA 0.13 over about 0.1 UI). The curves are printed.
module tb_hbr_pd_characteristic;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int  NC     = 6;
  localparam int  NPH    = 51;      // -0.5 .. +0.5 UI in 0.02 UI steps
  localparam int  NUI    = 4000;    // UIs per phase point (2000 sampled)
  localparam real SIGMA  = 0.05;
  localparam real A [NC] = '{0.33, 0.33, 0.33, 0.43, 0.22, 0.17};
  localparam real B [NC] = '{0.0, 0.0, 0.0, 0.13, -0.18, -0.27};
  localparam real VR[NC] = '{0.6, 0.55, 0.65, 0.6, 0.6, 0.6};

  logic       clk = 0, rst_n = 0;
  logic [1:0] dh, dl, ed, dm, early, late;
  int checks = 0, failures = 0;

  hbr_pd dut (.*);

  initial begin
    #50000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic bits [NUI + 8];

  function automatic real noise();
    real s;
    s = 0.0;
    for (int i = 0; i < 12; i++) s += $itor($urandom_range(10000)) / 10000.0;
    return (s - 6.0) * SIGMA;
  endfunction

  function automatic real sym(int k);
    if (k < 0) return -1.0;
    return bits[k] ? 1.0 : -1.0;
  endfunction

  function automatic real cur(int c, int k);
    return sym(k) + A[c] * sym(k - 1) + B[c] * sym(k - 2);
  endfunction

  // waveform at time u (in UI); bit k occupies [k, k+1), centre k+0.5
  function automatic real wave(int c, real u);
    int  k;
    real fr;
    k  = int'($floor(u));
    fr = u - $floor(u);
    if (fr >= 0.5) return cur(c, k) + (cur(c, k + 1) - cur(c, k)) * (fr - 0.5);
    return cur(c, k - 1) + (cur(c, k) - cur(c, k - 1)) * (fr + 0.5);
  endfunction

  real pd_out [NC][NPH];

  initial begin
    logic [6:0] lfsr;
    lfsr = 7'h5A;
    for (int k = 0; k < NUI + 8; k++) begin
      bits[k] = lfsr[6] ^ lfsr[5];
      lfsr = {lfsr[5:0], bits[k]};
    end
    dh = '0; dl = '0; ed = '0; dm = '0;
    #10 rst_n = 1;
    for (int c = 0; c < NC; c++) begin
      for (int p = 0; p < NPH; p++) begin
        real phi;
        int  acc, n;
        phi = -0.5 + 0.02 * p;
        acc = 0; n = 0;
        // sampled UIs k = 4, 6, 8, ...: edge at k + phi, centre at k + 0.5 + phi
        for (int k = 4; k + 2 < NUI; k += 4) begin
          for (int s = 0; s < 2; s++) begin
            real ve, vc;
            ve = wave(c, real'(k + 2 * s) + phi) + noise();
            vc = wave(c, real'(k + 2 * s) + 0.5 + phi) + noise();
            dh[s] = ve > VR[c];
            dl[s] = ve > -VR[c];
            ed[s] = ve > 0.0;
            dm[s] = vc > 0.0;
          end
          #5 clk = 1;
          #1;
          acc += int'(late[0]) + int'(late[1]) - int'(early[0]) - int'(early[1]);
          n   += 2;
          #4 clk = 0;
        end
        pd_out[c][p] = real'(acc) / real'(n);
      end
    end
    for (int c = 0; c < NC; c++) begin
      int  z;
      real best;
      string line;
      line = "";
      for (int p = 0; p < NPH; p += 5) line = {line, $sformatf(" %6.3f", pd_out[c][p])};
      $display("alpha=%0.2f beta=%0.2f vref=%0.2f: phi=-0.5..0.5 step 0.1:%s", A[c], B[c], VR[c], line);
      // stable crossing nearest to the edge: out <= 0 at p, > 0 at p+1
      z = -1;
      best = 1.0;
      for (int p = 0; p + 1 < NPH; p++) begin
        real ph;
        ph = -0.5 + 0.02 * p + 0.01;
        if (pd_out[c][p] <= 0.0 && pd_out[c][p + 1] > 0.0 && (ph < 0 ? -ph : ph) < best) begin
          best = (ph < 0 ? -ph : ph);
          z = p;
        end
      end
      checks++;
      if (z < 0 || best > 0.25) begin
        failures++; $display("FAIL case %0d: no stable crossing near the edge", c);
      end else if (c < 3) begin
        checks++;
        if (z - 2 < 0 || z + 3 >= NPH || pd_out[c][z - 2] > -0.02 || pd_out[c][z + 3] < 0.02) begin
          failures++; $display("FAIL case %0d: dead zone around phi=%0.2f", c, -0.5 + 0.02 * z + 0.01);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
