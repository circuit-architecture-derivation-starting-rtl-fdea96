// tb_dds_spectrum: spectral comparison of the four output configurations of
// the DDS at the default sizes (32-bit accumulator, V = 6, B = 64).
//
// For every pulse the timing error against the exact phase crossing is
// recorded (in virtual clock ticks), and the periodogram of that error
// sequence is computed with a plain DFT over NP pulses. Timing error is what
// turns into spurs and noise around the carrier, so the periodogram shows
// the same effects as the output spectrum:
//   1. s_ov, uncorrected pulse output: error up to one reference period,
//      periodic, strong discrete lines.
//   2. virtual clock enhancement only: error power lower by about B^2, still
//      periodic, i.e. still discrete lines.
//   3. with dithering: no discrete lines left (largest bin close to the
//      mean level), error white.
//   4. with noise shaping: error power at low frequencies far below the
//      power at high frequencies.
//   5. with dithering and noise shaping on the periodic ratio: no discrete
//      lines, and the error still shaped.
// Run A uses N/M = 112/373, for which the pulse spacing is 213 + 1/7 ticks
// and the uncorrected errors repeat every 7 pulses. Run B uses a ratio with
// no short period. The DUT is reset between runs. The pipeline delay C0 is
// taken from the first pulse of run A (no optional stage active, error
// known exactly), as in tb_dds_top.
module tb_dds_spectrum;

  localparam int unsigned M_W = 32;
  localparam int unsigned V   = 6;
  localparam int unsigned B   = 1 << V;
  localparam int          NP  = 1008;         // pulses per periodogram
  localparam int          SKIP = 16;          // pulses skipped after reset

  logic              clk, clk_v, rst_n;
  logic [M_W-1:0]    n_word;
  logic [M_W:0]      m_mod;
  logic              dith_en, ns_en;
  logic              s_ov;
  logic [B-1:0]      slot_word;
  logic              s_dds;

  dds_top dut (
    .clk      (clk),
    .clk_v    (clk_v),
    .rst_n    (rst_n),
    .n_word   (n_word),
    .m_mod    (m_mod),
    .dith_en  (dith_en),
    .ns_en    (ns_en),
    .s_ov     (s_ov),
    .slot_word(slot_word),
    .s_dds    (s_dds)
  );

  int checks = 0, failures = 0;

  initial begin clk_v = 1'b0; forever #1 clk_v = ~clk_v; end
  initial begin
    clk = 1'b0;
    #1;
    forever begin clk = 1'b1; #(B); clk = 1'b0; #(B); end
  end

  initial begin
    #(2 * B * 60000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model: exact crossing times -----------------
  typedef struct { longint xn; longint n; } ev_t;
  ev_t    evq[$];          // for s_dds
  ev_t    rawq[$];         // for s_ov
  longint unsigned macc;
  longint k;

  always @(posedge clk) begin
    if (rst_n) begin
      longint unsigned sum;
      k++;
      sum = macc + longint'(n_word);
      if (macc >= longint'(m_mod)) macc = 0;
      else if (sum >= longint'(m_mod)) begin
        ev_t e;
        macc   = sum - longint'(m_mod);
        e.xn   = k * B * longint'(n_word) - longint'(macc) * B;
        e.n    = longint'(n_word);
        evq.push_back(e);
        rawq.push_back(e);
      end else macc = sum;
      // raw pulse: s_ov seen here was registered at the previous edge k-1
      if (s_ov && rawq.size() > 0) begin
        ev_t e;
        e = rawq.pop_front();
        raw_err.push_back(real'((k - 1) * B * e.n - e.xn) / real'(e.n));
      end
    end
  end

  // ---------------- corrected pulses ---------------------------------------
  longint tick;
  bit     have_c0 = 1'b0;
  longint c0;
  real    cor_err[$];
  real    raw_err[$];

  function automatic longint ceil_div(longint a, longint b);
    return (a >= 0) ? (a + b - 1) / b : -((-a) / b);
  endfunction

  always @(posedge clk_v) begin
    if (rst_n) begin
      tick++;
      if (s_dds && evq.size() > 0) begin
        ev_t e;
        e = evq.pop_front();
        if (!have_c0) begin
          c0 = tick - ceil_div(e.xn, e.n);
          have_c0 = 1'b1;
        end
        cor_err.push_back(real'((tick - c0) * e.n - e.xn) / real'(e.n));
      end
    end
  end

  // ---------------- periodogram ---------------------------------------------
  localparam real PI = 3.14159265358979;
  real pw[NP/2];

  // periodogram of seq[SKIP .. SKIP+NP-1], mean removed; returns variance
  task automatic periodogram(input real seq[$], output real var_out);
    real mean, re, im, x;
    mean = 0.0;
    for (int i = 0; i < NP; i++) mean += seq[SKIP + i];
    mean /= NP;
    var_out = 0.0;
    for (int i = 0; i < NP; i++) var_out += (seq[SKIP + i] - mean) ** 2;
    var_out /= NP;
    for (int f = 1; f < NP / 2; f++) begin
      re = 0.0; im = 0.0;
      for (int i = 0; i < NP; i++) begin
        x = seq[SKIP + i] - mean;
        re += x * $cos(2.0 * PI * f * i / NP);
        im -= x * $sin(2.0 * PI * f * i / NP);
      end
      pw[f] = (re * re + im * im) / NP;
    end
    pw[0] = 0.0;
  endtask

  // largest bin, mean bin, and mean power in the low and high frequency bands
  task automatic stats(output real pmax, output real pmean, output real plow, output real phigh);
    int nl = 0, nh = 0;
    pmax = 0.0; pmean = 0.0; plow = 0.0; phigh = 0.0;
    for (int f = 1; f < NP / 2; f++) begin
      if (pw[f] > pmax) pmax = pw[f];
      pmean += pw[f];
      if (f < NP / 32) begin plow += pw[f]; nl++; end
      if (f >= NP / 4) begin phigh += pw[f]; nh++; end
    end
    pmean /= (NP / 2 - 1);
    plow  /= nl;
    phigh /= nh;
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // one run: reset, configure, collect NP+SKIP pulses
  task automatic run(longint n, longint m, bit dith, bit ns);
    @(negedge clk);
    rst_n = 1'b0;
    n_word = M_W'(n); m_mod = (M_W+1)'(m); dith_en = dith; ns_en = ns;
    repeat (2) @(negedge clk);
    macc = 0; k = 0; tick = 0;
    evq.delete(); rawq.delete(); cor_err.delete(); raw_err.delete();
    rst_n = 1'b1;
    wait (cor_err.size() >= NP + SKIP && raw_err.size() >= NP + SKIP);
  endtask

  real v_raw, v_vce, v_dith, v_ns, v_both;
  real mx_raw, mx_vce, mx_dith, mx_ns, mn_raw, mn_vce, mn_dith, mn_ns, mx_both, mn_both;
  real lo_x, hi_x, lo_ns, hi_ns, lo_dith, hi_dith, lo_both, hi_both;
  localparam longint MA = 373 * (longint'(1) << 22);
  localparam longint NA = 112 * (longint'(1) << 22);
  localparam longint MB = longint'(1) << 32;
  localparam longint NB = longint'(32'h4D2F_1A37);

  initial begin
    rst_n = 1'b0; n_word = '0; m_mod = (M_W+1)'(MB); dith_en = 1'b0; ns_en = 1'b0;
    macc = 0; k = 0; tick = 0;
    repeat (2) @(negedge clk);

    // Run A, uncorrected and virtual clock enhancement only
    run(NA, MA, 1'b0, 1'b0);
    periodogram(raw_err, v_raw);
    stats(mx_raw, mn_raw, lo_x, hi_x);
    periodogram(cor_err, v_vce);
    stats(mx_vce, mn_vce, lo_x, hi_x);
    // Run A with dithering
    run(NA, MA, 1'b1, 1'b0);
    periodogram(cor_err, v_dith);
    stats(mx_dith, mn_dith, lo_dith, hi_dith);
    // Run B with noise shaping
    run(NB, MB, 1'b0, 1'b1);
    periodogram(cor_err, v_ns);
    stats(mx_ns, mn_ns, lo_ns, hi_ns);
    // Run A with dithering and noise shaping
    run(NA, MA, 1'b1, 1'b1);
    periodogram(cor_err, v_both);
    stats(mx_both, mn_both, lo_both, hi_both);

    $display("error power [tick^2]: uncorrected %.3f  vce %.5f  vce+dither %.5f  vce+noise shaping %.5f",
             v_raw, v_vce, v_dith, v_ns);
    $display("largest/mean bin:     uncorrected %.1f  vce %.1f  vce+dither %.1f",
             mx_raw / mn_raw, mx_vce / mn_vce, mx_dith / mn_dith);
    $display("noise shaping: low band %.6f  high band %.6f (dither: %.6f / %.6f)",
             lo_ns, hi_ns, lo_dith, hi_dith);
    $display("dither + noise shaping: power %.5f  largest/mean bin %.1f  low band %.6f  high band %.6f",
             v_both, mx_both / mn_both, lo_both, hi_both);

    // the uncorrected error spans one reference period: variance about B^2/12
    check(v_raw > real'(B * B) / 24.0, "uncorrected error power too small");
    // virtual clock enhancement: error power lower by at least B^2/4
    check(v_vce < v_raw / (real'(B * B) / 4.0), "virtual clock enhancement does not reduce the error power");
    check(mx_vce < mx_raw / (real'(B * B) / 4.0), "virtual clock enhancement does not reduce the largest line");
    // periodic error: discrete lines in the first two configurations
    check(mx_raw / mn_raw > 50.0, "no discrete lines in the uncorrected output");
    check(mx_vce / mn_vce > 50.0, "no discrete lines after virtual clock enhancement");
    // dithering: lines gone (for white noise the largest of ~500 bins is
    // about ln(500) = 6 times the mean)
    check(mx_dith / mn_dith < 15.0, "discrete lines left after dithering");
    check(mx_dith < mx_vce / 10.0, "dithering does not lower the largest line");
    // noise shaping: low band far below high band, dither band flat
    check(lo_ns < hi_ns / 20.0, "noise shaping does not move the error power to high frequencies");
    check(lo_dith > hi_dith / 4.0 && lo_dith < hi_dith * 4.0, "dithered error is not flat");
    // dithered noise shaping: no lines on the periodic ratio, still shaped
    check(mx_both / mn_both < 20.0, "discrete lines left after dithered noise shaping");
    check(lo_both < hi_both / 20.0, "dithered noise shaping does not shape the error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
