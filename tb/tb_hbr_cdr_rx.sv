// tb_hbr_cdr_rx: end-to-end closed-loop test of the 30 Gb/s 2x
// half-baud-rate receiver at its default parameters.
//
// The testbench plays transmitter, channel and equalizer: it produces PRBS
// data at 30 Gb/s plus PPM parts per million (faster than the VCO's start
// frequency of 7.5 GHz x 4), and drives vin with an equalized waveform that
// keeps one post-cursor, y_k = b_k + ALPHA*b_(k-1) with b = +/-1, linearly
// interpolated between bit centres and updated every STEP_PS.
//
// Sequence: reset; lock on PRBS7; a clean PRBS7 window; one transmitted bit
// inverted; switch of pattern and BERT to PRBS31; a clean PRBS31 window.
// Checks:
//   - every recovered 32-bit word, once aligned to the transmitted bit
//     history kept here, equals the transmitted bits (independent of the
//     BERT), and no word is lost or repeated;
//   - the BERT reports no errors in the clean windows and exactly 3 counted
//     errors (self-synchronising checker) for the one inverted bit;
//   - the recovered clock follows the data: the mean CK/8 period over the
//     PRBS31 window equals 32 transmitted UIs within 100 ppm, and CK/16
//     has twice that period; the integral path has moved vctrl up;
//   - the BERT checks 32 bits per CK/8 cycle (rate).
// Each mechanism is counted and must occur: EARLY, LATE and HOLD decisions,
// UP, DN and tie at the voter, all four decoder input patterns of the
// decoder table, the ERR flag, and the mode switch.
module tb_hbr_cdr_rx;
  timeunit 1ps;
  timeprecision 1fs;

  localparam real PPM     = 2000.0;
  localparam real ALPHA   = 0.33;
  localparam real VREF    = 0.6;
  localparam real STEP_PS = 0.5;
  localparam real UI_PS   = 1000.0 / (30.0 * (1.0 + PPM * 1.0e-6));
  localparam int  HN      = 16384;    // transmitted-bit history depth

  logic        rst_n = 0;
  real         vin = 0.0, vref = VREF;
  logic        prbs31 = 0;
  logic        err, ck8, ck16;
  logic [31:0] err_count, rx_word;
  logic [47:0] bit_count;
  real         vctrl;

  int checks = 0, failures = 0;

  hbr_cdr_rx dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    #6000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ transmitter
  logic [30:0] lfsr   = 31'h0000_0055;
  logic        mode31 = 0;
  longint      gen_k  = -1;          // last generated bit index
  logic        hist [HN];            // transmitted bits, index k % HN
  longint      flip_at = -1;         // bit index to invert on the line

  function automatic logic tx_next();
    logic b;
    if (mode31) b = lfsr[30] ^ lfsr[27];
    else        b = lfsr[6] ^ lfsr[5];
    lfsr = {lfsr[29:0], b};
    return b;
  endfunction

  function automatic void gen_upto(longint k);
    while (gen_k < k) begin
      logic b;
      gen_k++;
      b = tx_next();
      if (gen_k == flip_at) b = ~b;
      hist[int'(gen_k % HN)] = b;
    end
  endfunction

  function automatic real sym(longint k);
    if (k < 0) return -1.0;
    return hist[int'(k % HN)] ? 1.0 : -1.0;
  endfunction

  function automatic real cursor(longint k);
    return sym(k) + ALPHA * sym(k - 1);
  endfunction

  // equalized channel output
  initial begin
    forever begin
      real u, fr, a, b, w;
      longint k;
      u  = $realtime / UI_PS;
      k  = longint'($floor(u));
      fr = u - $floor(u);
      gen_upto(k + 1);
      if (fr >= 0.5) begin a = cursor(k);     b = cursor(k + 1); w = fr - 0.5; end
      else           begin a = cursor(k - 1); b = cursor(k);     w = fr + 0.5; end
      vin = a + (b - a) * w;
      #(STEP_PS);
    end
  end

  // ------------------------------------------------------ mechanism counters
  int n_early = 0, n_late = 0, n_hold = 0, n_up = 0, n_dn = 0, n_tie = 0, n_err_flag = 0;
  int n_pat [8] = '{default: 0};
  always @(posedge dut.clk_dig) if (rst_n) begin
    for (int s = 0; s < 2; s++) begin
      if (dut.early[s]) n_early++;
      else if (dut.late[s]) n_late++;
      else n_hold++;
      n_pat[{dut.dh[s], dut.dl[s], dut.dm[s]}]++;
    end
    if (dut.up) n_up++;
    else if (dut.dn) n_dn++;
    else n_tie++;
  end
  always @(posedge ck8) if (err) n_err_flag++;

  // -------------------------------------- recovered words vs transmitted bits
  bit     aligned = 0, compare_on = 0;
  longint next_k = 0;
  int     n_words_ok = 0, n_words_bad = 0, n_align = 0;
  always @(posedge ck8) if (compare_on) begin
    if (!aligned) begin
      // search the recent history for the word (bit 0 oldest)
      for (longint s = gen_k - 40; s > gen_k - 4000 && !aligned; s--) begin
        bit m;
        m = 1;
        for (int i = 0; i < 32; i++) if (hist[int'((s + i) % HN)] != rx_word[i]) m = 0;
        if (m) begin aligned = 1; next_k = s + 32; n_align++; end
      end
    end else begin
      bit m;
      m = 1;
      for (int i = 0; i < 32; i++) if (hist[int'((next_k + i) % HN)] != rx_word[i]) m = 0;
      if (m) n_words_ok++;
      else begin
        n_words_bad++;
        if (n_words_bad < 5) $display("FAIL word at bit %0d: got %h", next_k, rx_word);
      end
      next_k += 32;
    end
  end

  // ----------------------------------------------------------- clock checks
  real    t_ck8_first = 0.0, t_ck8_last = 0.0, t_ck16_first = 0.0, t_ck16_last = 0.0;
  int     n_ck8 = 0, n_ck16 = 0;
  bit     meas_on = 0;
  always @(posedge ck8) if (meas_on) begin
    if (n_ck8 == 0) t_ck8_first = $realtime;
    t_ck8_last = $realtime;
    n_ck8++;
  end
  always @(posedge ck16) if (meas_on) begin
    if (n_ck16 == 0) t_ck16_first = $realtime;
    t_ck16_last = $realtime;
    n_ck16++;
  end

  // --------------------------------------------------------------- sequence
  initial begin
    logic [31:0] e0;
    logic [47:0] b0;
    real vcap0;
    int  bad0;
    #5000 rst_n = 1;
    vcap0 = dut.u_cp_lf.vcap;
    // lock on PRBS7
    #400000;
    compare_on = 1;
    #20000;
    check(aligned, "recovered data aligned to transmitted PRBS7");
    // clean PRBS7 window
    e0 = err_count;
    #200000;
    check(err_count == e0, $sformatf("PRBS7 window: %0d BERT errors", err_count - e0));
    check(bit_count > 48'd5000, "BERT checked PRBS7 bits");
    // one inverted bit on the line
    e0 = err_count;
    flip_at = gen_k + 200;
    #50000;
    check(err_count == e0 + 3, $sformatf("one line error counted %0d times", err_count - e0));
    // pattern switch
    mode31 = 1;
    #20000;
    prbs31 = 1;
    aligned = 0;
    #20000;
    check(aligned, "recovered data aligned to transmitted PRBS31");
    e0 = err_count;
    b0 = bit_count;
    bad0 = n_words_bad;
    meas_on = 1;
    #600000;
    meas_on = 0;
    check(err_count == e0, $sformatf("PRBS31 window: %0d BERT errors", err_count - e0));
    check(bit_count - b0 >= 48'(32 * (n_ck8 - 1)) && bit_count - b0 <= 48'(32 * (n_ck8 + 1)),
          $sformatf("BERT rate: %0d bits in %0d CK/8 cycles", bit_count - b0, n_ck8));
    check(n_words_bad == 0, $sformatf("%0d recovered words differ from the transmitted bits", n_words_bad));
    check(n_words_ok > 500, $sformatf("only %0d words compared", n_words_ok));
    check(n_align == 2, $sformatf("word alignment found %0d times", n_align));
    begin
      real per8, per16, exp8, ppm_err;
      per8    = (t_ck8_last - t_ck8_first) / real'(n_ck8 - 1);
      per16   = (t_ck16_last - t_ck16_first) / real'(n_ck16 - 1);
      exp8    = 32.0 * UI_PS;
      ppm_err = (per8 - exp8) / exp8 * 1.0e6;
      $display("CK/8 period %f ps, expected %f ps (%f ppm); CK/16 %f ps; vcap %f -> %f V",
               per8, exp8, ppm_err, per16, vcap0, dut.u_cp_lf.vcap);
      check(ppm_err < 100.0 && ppm_err > -100.0, "recovered clock frequency");
      check(per16 > 2.0 * per8 - 1.0 && per16 < 2.0 * per8 + 1.0, "CK/16 period");
      check(dut.u_cp_lf.vcap > vcap0 + 0.5 * PPM * 1.0e-6 * 7.5 / 5.0, "integral path tracked the offset");
    end
    // mechanisms
    $display("PD early=%0d late=%0d hold=%0d  MV up=%0d dn=%0d tie=%0d  ERR flags=%0d",
             n_early, n_late, n_hold, n_up, n_dn, n_tie, n_err_flag);
    $display("DD patterns 000=%0d 010=%0d 011=%0d 111=%0d others=%0d",
             n_pat[0], n_pat[2], n_pat[3], n_pat[7], n_pat[1] + n_pat[4] + n_pat[5] + n_pat[6]);
    check(n_early > 0, "EARLY decisions occurred");
    check(n_late > 0, "LATE decisions occurred");
    check(n_hold > 0, "HOLD decisions occurred");
    check(n_up > 0, "UP commands occurred");
    check(n_dn > 0, "DN commands occurred");
    check(n_tie > 0, "voter ties occurred");
    check(n_pat[0] > 0 && n_pat[2] > 0 && n_pat[3] > 0 && n_pat[7] > 0, "all four decoder patterns occurred");
    check(n_err_flag > 0, "ERR flag raised");
    check(prbs31 && mode31, "mode switch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
