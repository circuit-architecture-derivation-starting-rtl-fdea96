// tb_pulse_dds: self-checking test of the phase accumulator.
//
// A 64-bit reference model repeats the modulo-M accumulation each cycle and
// the registered overflow, remainder and N are compared with it. Stimulus:
// M = 2^32 with random N, N > M/2 (overflows in consecutive cycles), a
// general modulus, and lowering M below the phase. The overflow count over
// a long run is also checked against the rate N/M.
module tb_pulse_dds;

  localparam int unsigned M_W = 32;

  logic           clk = 1'b0, rst_n;
  logic [M_W-1:0] n_word;
  logic [M_W:0]   m_mod;
  logic           ov;
  logic [M_W-1:0] rem, n_out;

  pulse_dds dut (.clk(clk), .rst_n(rst_n), .n_word(n_word), .m_mod(m_mod),
                 .ov(ov), .rem(rem), .n_out(n_out));

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    #(10 * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint unsigned macc;
  logic            m_ov;
  longint unsigned m_n;
  int              n_ov = 0, n_consec = 0;
  logic            prev_ov = 1'b0;

  // model step, evaluated with the inputs the DUT samples at this edge
  always @(posedge clk) begin
    if (rst_n) begin
      longint unsigned sum;
      sum  = macc + longint'(n_word);
      m_ov = 1'b0;
      m_n  = longint'(n_word);
      if (macc >= longint'(m_mod)) macc = 0;
      else if (sum >= longint'(m_mod)) begin macc = sum - longint'(m_mod); m_ov = 1'b1; end
      else macc = sum;
    end
  end

  // compare just after the edge
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (ov !== m_ov || longint'(rem) != macc || longint'(n_out) != m_n) begin
        failures++;
        if (failures < 10)
          $display("t=%0t ov=%b/%b rem=%0d/%0d n=%0d/%0d", $time, ov, m_ov, rem, macc, n_out, m_n);
      end
      if (ov) begin n_ov++; if (prev_ov) n_consec++; end
      prev_ov = ov;
    end
  end

  localparam longint M2 = longint'(1) << M_W;

  task automatic rate(longint n, longint m, int cycles);
    int c0, got;
    longint lo;
    @(negedge clk);
    n_word = M_W'(n); m_mod = (M_W+1)'(m);
    repeat (2) @(negedge clk);
    c0 = n_ov;
    repeat (cycles) @(negedge clk);
    got = n_ov - c0;
    lo = (longint'(cycles) * n) / m;
    checks++;
    if (longint'(got) < lo || longint'(got) > lo + 1) begin
      failures++;
      $display("rate: %0d overflows in %0d cycles for N=%0d M=%0d", got, cycles, n, m);
    end
  endtask

  initial begin
    rst_n = 1'b0; n_word = '0; m_mod = (M_W+1)'(M2); macc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    rate(longint'(32'h1234_5679), M2, 20000);
    rate(longint'(32'hE000_0001), M2, 5000);            // N > M/2
    rate(longint'(1000), longint'(7919), 7919 * 3);      // general modulus
    for (int i = 0; i < 2000; i++) begin                 // random hops
      @(negedge clk);
      m_mod  = (M_W+1)'(M2 - longint'($urandom_range(0, 1000)));
      n_word = M_W'($urandom_range(1, 32'hFFFF_0000));
    end
    // lower M below the current phase
    @(negedge clk); n_word = 32'h0000_1000; m_mod = (M_W+1)'(M2);
    repeat (3) @(negedge clk);
    m_mod = 33'd100;
    repeat (5) @(negedge clk);
    n_word = 32'd30;
    repeat (50) @(negedge clk);
    checks++;
    if (n_consec == 0) begin failures++; $display("no consecutive overflows"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
