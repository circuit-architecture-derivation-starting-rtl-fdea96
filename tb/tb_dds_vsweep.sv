// tb_dds_vsweep: effect of the virtual clock factor v on the output, for
// v = 2, 3, 4, 5, 6 (B = 4 .. 64), 32-bit accumulator.
//
// Five DDS instances, one per v, run side by side from the same reference
// clock, each with its own virtual clock of 2^v times the reference rate.
// For every pulse the timing error against the exact phase crossing is
// recorded in reference periods, and a DFT over NP pulses gives its
// periodogram. Two runs:
//   1. virtual clock enhancement only, N/M = 112/373 (error pattern repeats
//      every 7 pulses): the largest discrete line must fall by at least a
//      factor of 2 (3 dB) for every step of v, i.e. the spur-free range
//      grows with v.
//   2. noise shaping, N/M = 0x4D2F1A37 / 2^32: the error power in the low
//      band (near the carrier) must fall by at least a factor of 2 for every
//      step of v, i.e. the in-band signal-to-noise ratio grows with v.
// The measured values are printed in dB per step.
module tb_dds_vsweep;

  localparam int unsigned M_W  = 32;
  localparam int          NV   = 5;           // v = 2 .. 6
  localparam int          VMIN = 2;
  localparam int          HREF = 64;          // half period of clk
  localparam int          NP   = 1008;
  localparam int          SKIP = 16;

  logic           clk, rst_n;
  logic [NV-1:0]  clk_v;
  logic [M_W-1:0] n_word;
  logic [M_W:0]   m_mod;
  logic           dith_en, ns_en;
  logic [NV-1:0]  s_ov, s_dds;

  int checks = 0, failures = 0;

  // all rising edges line up at time 1 + n * 2 * HREF
  initial begin
    clk = 1'b0;
    #1;
    forever begin clk = 1'b1; #(HREF); clk = 1'b0; #(HREF); end
  end

  initial begin
    #(2 * HREF * 60000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model, in reference periods ----------------
  typedef struct { longint xn; longint n; } ev_t;   // X * N, in periods
  longint unsigned macc;
  longint k;
  ev_t    evq[NV][$];
  real    err[NV][$];

  always @(posedge clk) begin
    if (rst_n) begin
      longint unsigned sum;
      k++;
      sum = macc + longint'(n_word);
      if (macc >= longint'(m_mod)) macc = 0;
      else if (sum >= longint'(m_mod)) begin
        ev_t e;
        macc = sum - longint'(m_mod);
        e.xn = k * longint'(n_word) - longint'(macc);
        e.n  = longint'(n_word);
        for (int i = 0; i < NV; i++) evq[i].push_back(e);
      end else macc = sum;
    end
  end

  function automatic longint ceil_div(longint a, longint b);
    return (a >= 0) ? (a + b - 1) / b : -((-a) / b);
  endfunction

  for (genvar g = 0; g < NV; g++) begin : g_v
    localparam int V = VMIN + g;
    localparam int B = 1 << V;
    localparam int H = HREF / B;               // half period of clk_v

    initial begin
      clk_v[g] = 1'b0;
      #1;
      forever begin clk_v[g] = 1'b1; #(H); clk_v[g] = 1'b0; #(H); end
    end

    logic [B-1:0] slot_word;

    dds_top #(.M_W(M_W), .V(V)) dut (
      .clk      (clk),
      .clk_v    (clk_v[g]),
      .rst_n    (rst_n),
      .n_word   (n_word),
      .m_mod    (m_mod),
      .dith_en  (dith_en),
      .ns_en    (ns_en),
      .s_ov     (s_ov[g]),
      .slot_word(slot_word),
      .s_dds    (s_dds[g])
    );

    longint tick;
    bit     have_c0;
    longint c0;

    always @(posedge clk_v[g]) begin
      if (rst_n) begin
        tick++;
        if (s_dds[g] && evq[g].size() > 0) begin
          ev_t    e;
          longint xt;                          // X * N in ticks
          e  = evq[g].pop_front();
          xt = e.xn * B;
          if (!have_c0) begin
            c0 = tick - ceil_div(xt, e.n);
            have_c0 = 1'b1;
          end
          err[g].push_back(real'((tick - c0) * e.n - xt) / real'(e.n) / real'(B));
        end
      end
    end
  end

  // ---------------- periodogram ---------------------------------------------
  localparam real PI = 3.14159265358979;

  // largest bin and mean low-band bin of the periodogram of err[i]
  task automatic analyse(int i, output real pmax, output real plow);
    real mean, re, im, x, p;
    int  nl;
    mean = 0.0;
    for (int n = 0; n < NP; n++) mean += err[i][SKIP + n];
    mean /= NP;
    pmax = 0.0; plow = 0.0; nl = 0;
    for (int f = 1; f < NP / 2; f++) begin
      re = 0.0; im = 0.0;
      for (int n = 0; n < NP; n++) begin
        x = err[i][SKIP + n] - mean;
        re += x * $cos(2.0 * PI * f * n / NP);
        im -= x * $sin(2.0 * PI * f * n / NP);
      end
      p = (re * re + im * im) / NP;
      if (p > pmax) pmax = p;
      if (f < NP / 32) begin plow += p; nl++; end
    end
    plow /= nl;
  endtask

  task automatic run(longint n, longint m, bit dith, bit ns);
    bit done;
    @(negedge clk);
    rst_n = 1'b0;
    n_word = M_W'(n); m_mod = (M_W+1)'(m); dith_en = dith; ns_en = ns;
    repeat (2) @(negedge clk);
    macc = 0; k = 0;
    for (int i = 0; i < NV; i++) begin evq[i].delete(); err[i].delete(); end
    g_v[0].tick = 0; g_v[1].tick = 0; g_v[2].tick = 0; g_v[3].tick = 0; g_v[4].tick = 0;
    g_v[0].have_c0 = 0; g_v[1].have_c0 = 0; g_v[2].have_c0 = 0; g_v[3].have_c0 = 0;
    g_v[4].have_c0 = 0;
    rst_n = 1'b1;
    do begin
      @(negedge clk);
      done = 1'b1;
      for (int i = 0; i < NV; i++) if (err[i].size() < NP + SKIP) done = 1'b0;
    end while (!done);
  endtask

  function automatic real db(real x);
    return 10.0 * $log10(x);
  endfunction

  real line[NV], low[NV], dummy;
  localparam longint MA = 373 * (longint'(1) << 22);
  localparam longint NA = 112 * (longint'(1) << 22);
  localparam longint MB = longint'(1) << 32;
  localparam longint NB = longint'(32'h4D2F_1A37);

  initial begin
    rst_n = 1'b0; n_word = '0; m_mod = (M_W+1)'(MB); dith_en = 1'b0; ns_en = 1'b0;
    macc = 0; k = 0;
    repeat (2) @(negedge clk);

    run(NA, MA, 1'b0, 1'b0);
    for (int i = 0; i < NV; i++) analyse(i, line[i], dummy);
    run(NB, MB, 1'b0, 1'b1);
    for (int i = 0; i < NV; i++) analyse(i, dummy, low[i]);

    for (int i = 0; i < NV; i++)
      $display("v=%0d: largest line %.1f dB, noise-shaped low band %.1f dB (period^2 per bin)",
               VMIN + i, db(line[i]), db(low[i]));
    for (int i = 1; i < NV; i++) begin
      checks++;
      if (line[i] > line[i-1] / 2.0) begin
        failures++;
        $display("v=%0d: largest line not below v=%0d by 3 dB", VMIN + i, VMIN + i - 1);
      end
      checks++;
      if (low[i] > low[i-1] / 2.0) begin
        failures++;
        $display("v=%0d: low-band noise not below v=%0d by 3 dB", VMIN + i, VMIN + i - 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
