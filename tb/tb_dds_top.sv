// tb_dds_top: end-to-end test of the pulse output DDS with jitter
// correction, at the default sizes (32-bit accumulator, V = 6, so 64
// virtual clock ticks per reference period).
//
// A reference model in the testbench repeats the phase accumulation with
// 64-bit arithmetic and records, for every overflow, the exact time X at
// which the phase crossed M, in virtual ticks (X = k*B - r*B/N for an
// overflow registered at reference edge k with remainder r). Each pulse seen
// on s_dds is matched, in order, with the next recorded overflow, and its
// tick P is compared with X after removing the constant pipeline delay C0
// (taken from the first pulse):
//   virtual clock enhancement only : P - C0 == ceil(X) exactly
//   with dithering                 : |P - C0 - X| < 1 tick, mean error near 0
//   with noise shaping             : |P - C0 - X| < 1 tick and the running
//                                    sum of (P - C0 - X) within 2 ticks
//   dithering and noise shaping    : the same
// The pulse rate of s_ov is checked against N/M. Phases cover a power-of-two
// and a general modulus, N > M/2 (overflows in consecutive cycles) and
// frequency changes; every mechanism is counted and must occur.
module tb_dds_top;

  localparam int unsigned M_W = 32;
  localparam int unsigned V   = 6;
  localparam int unsigned B   = 1 << V;

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

  // Virtual clock: period 2. Reference clock: period 2*B, rising edges on
  // rising edges of clk_v.
  initial begin clk_v = 1'b0; forever #1 clk_v = ~clk_v; end
  initial begin
    clk = 1'b0;
    #1;
    forever begin clk = 1'b1; #(B); clk = 1'b0; #(B); end
  end

  // Watchdog
  initial begin
    #(2 * B * 40000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model (reference clock domain) -------------
  typedef enum logic [1:0] {M_VCE, M_DITH, M_NS, M_BOTH} mode_e;
  mode_e mode;
  longint unsigned macc;
  longint k;              // reference edges since reset release
  longint last_switch;    // edge of the last mode switch
  typedef struct {
    longint xn;           // X * N
    longint n;
    longint k;            // reference edge of the overflow
    mode_e  mode;
    bit     skip;         // too close to a mode switch
  } ev_t;
  ev_t evq[$];
  int  n_ov_seen = 0, n_consec = 0, n_qnz = 0;
  int  n_dith_c = 0, n_ns_c = 0, n_nchg = 0, n_mgen = 0;
  logic prev_ov = 1'b0;
  longint prev_n = -1;

  always @(posedge clk) begin
    if (rst_n) begin
      longint unsigned sum;
      bit ovm;
      k++;
      sum = macc + longint'(n_word);
      ovm = 1'b0;
      if (macc >= longint'(m_mod)) macc = 0;
      else if (sum >= longint'(m_mod)) begin
        macc = sum - longint'(m_mod);
        ovm  = 1'b1;
      end else macc = sum;
      if (ovm) begin
        ev_t e;
        e.xn   = k * B * longint'(n_word) - longint'(macc) * B;
        e.n    = longint'(n_word);
        e.k    = k;
        e.mode = mode;
        e.skip = (k - last_switch) < longint'(V + 8);
        evq.push_back(e);
        if (longint'(macc) * B >= longint'(n_word)) n_qnz++;
        if (m_mod != (M_W+1)'(1) << M_W) n_mgen++;
      end
      if (prev_n >= 0 && prev_n != longint'(n_word)) n_nchg++;
      prev_n = longint'(n_word);
      // DUT overflow output: registered at this same edge, seen next edge
      if (s_ov) begin
        n_ov_seen++;
        if (prev_ov) n_consec++;
      end
      prev_ov = s_ov;
      if (dut.u_dith.carry) n_dith_c++;
      if (dut.u_ns.carry)   n_ns_c++;
    end
  end

  // ---------------- output checker (virtual clock domain) ----------------
  longint tick = 0;
  bit     have_c0 = 1'b0;
  longint c0;
  int     n_pulses = 0;
  longint nssum_num;         // running sum of errors * N in a noise-shaping run
  real    dith_err_sum = 0.0;
  int     dith_err_cnt = 0;
  mode_e  last_mode = M_VCE;

  function automatic longint ceil_div(longint a, longint b);
    return (a >= 0) ? (a + b - 1) / b : -((-a) / b);
  endfunction

  always @(posedge clk_v) begin
    if (rst_n) begin
      tick++;
      if (s_dds) begin
        ev_t e;
        longint en;
        n_pulses++;
        if (evq.size() == 0) begin
          failures++;
          $display("pulse at tick %0d without a matching overflow", tick);
        end else begin
          e = evq.pop_front();
          if (!have_c0) begin
            if (e.mode != M_VCE) begin
              failures++;
              $display("first pulse not in VCE mode");
            end
            c0 = tick - ceil_div(e.xn, e.n);
            have_c0 = 1'b1;
          end
          en = (tick - c0) * e.n - e.xn;     // error * N
          if (e.mode != last_mode) begin
            nssum_num = 0;
            last_mode = e.mode;
          end
          if (!e.skip) begin
            checks++;
            unique case (e.mode)
              M_VCE: if ((tick - c0) != ceil_div(e.xn, e.n)) begin
                failures++;
                $display("VCE: pulse at %0d, expected %0d", tick - c0, ceil_div(e.xn, e.n));
              end
              M_DITH: begin
                if (en <= -e.n || en >= e.n) begin
                  failures++;
                  $display("DITH: error %0d/%0d out of range", en, e.n);
                end
                dith_err_sum += real'(en) / real'(e.n);
                dith_err_cnt++;
              end
              M_NS, M_BOTH: begin
                nssum_num += en;
                if (en <= -e.n || en >= e.n) begin
                  failures++;
                  $display("NS: error %0d/%0d out of range", en, e.n);
                end
                if (nssum_num <= -2 * e.n || nssum_num >= 2 * e.n) begin
                  failures++;
                  $display("NS: accumulated error %0d/%0d out of range", nssum_num, e.n);
                end
              end
            endcase
          end
        end
      end
    end
  end

  // ---------------- stimulus ---------------------------------------------
  task automatic run(int cycles);
    repeat (cycles) @(negedge clk);
  endtask

  task automatic set_mode(mode_e m);
    @(negedge clk);
    mode        = m;
    dith_en     = (m == M_DITH) || (m == M_BOTH);
    ns_en       = (m == M_NS)   || (m == M_BOTH);
    last_switch = k + 1;
    // overflows still in the pipeline see the new selection part-way
    foreach (evq[i]) if (last_switch - evq[i].k < longint'(V + 8)) evq[i].skip = 1'b1;
  endtask

  // checks that the overflow count over `cycles` steps matches N/M
  task automatic rate_check(longint n, longint m, int cycles);
    int cnt0, got;
    longint lo, hi;
    n_word = M_W'(n);
    m_mod  = (M_W+1)'(m);
    run(5);
    cnt0 = n_ov_seen;
    run(cycles);
    got = n_ov_seen - cnt0;
    lo  = (longint'(cycles) * n) / m;
    hi  = lo + 1;
    checks++;
    if (longint'(got) < lo || longint'(got) > hi) begin
      failures++;
      $display("rate: %0d overflows in %0d cycles, expected %0d..%0d", got, cycles, lo, hi);
    end
  endtask

  localparam longint M2 = longint'(1) << M_W;

  initial begin
    rst_n = 1'b0; n_word = '0; m_mod = (M_W+1)'(M2);
    dith_en = 1'b0; ns_en = 1'b0; mode = M_VCE;
    macc = 0; k = 0; last_switch = -100;
    repeat (3) @(negedge clk);
    // release between edges; both clock domains start counting at the next
    // common rising edge
    rst_n = 1'b1;

    // Phase A: virtual clock enhancement only, M = 2^m
    rate_check(longint'(32'h4D2F_1A37), M2, 3000);
    rate_check(longint'(32'hC3A1_5E09), M2, 1000);          // N > M/2
    for (int i = 0; i < 6; i++) begin                        // frequency hops
      n_word = M_W'($urandom);
      run(150);
    end
    // general modulus
    rate_check(longint'(123456789), longint'(1000000007), 2000);

    // Phase B: dithering
    set_mode(M_DITH);
    n_word = 32'h2B85_1EB8; m_mod = (M_W+1)'(M2);
    run(5000);
    // Phase C: noise shaping
    set_mode(M_NS);
    n_word = 32'h3A5E_3531;
    run(5000);
    // Phase D: both
    set_mode(M_BOTH);
    run(2000);

    // drain: no more overflows
    n_word = '0;
    run(V + 12);

    checks++;
    if (evq.size() != 0) begin
      failures++;
      $display("%0d overflows never appeared on s_dds", evq.size());
    end
    checks++;
    if (dith_err_cnt < 100 || (dith_err_sum / dith_err_cnt) > 0.1 ||
        (dith_err_sum / dith_err_cnt) < -0.1) begin
      failures++;
      $display("dither: mean error %f over %0d pulses", dith_err_sum / dith_err_cnt, dith_err_cnt);
    end

    $display("mechanisms: pulses=%0d overflows=%0d consecutive=%0d q_nonzero=%0d dither_carry=%0d ns_carry=%0d n_change=%0d general_M=%0d",
             n_pulses, n_ov_seen, n_consec, n_qnz, n_dith_c, n_ns_c, n_nchg, n_mgen);
    $display("dither mean error %f ticks over %0d pulses", dith_err_sum / dith_err_cnt, dith_err_cnt);
    if (n_consec == 0) begin failures++; $display("no consecutive overflows"); end
    if (n_qnz == 0)    begin failures++; $display("no non-zero VCE offset"); end
    if (n_dith_c == 0) begin failures++; $display("no dither carry"); end
    if (n_ns_c == 0)   begin failures++; $display("no noise shaping carry"); end
    if (n_nchg == 0)   begin failures++; $display("no frequency change"); end
    if (n_mgen == 0)   begin failures++; $display("no general modulus"); end
    checks += 6;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
