// tb_noise_shaper: self-checking test of the first-order noise shaper.
//
// A reference model keeps its own error register e (0 <= e < 2N): for every
// valid pulse with en set, v = e + r; the pulse gets one extra tick when
// v + d >= 2N, and e becomes v - N or v. Outputs are compared one cycle
// later. With en clear adv must pass unchanged and the error must restart
// from zero. The running sum of the realised rounding errors must stay
// within two ticks, with and without a dither value d, and without dither
// the loop must settle to the plain first-order behaviour (N <= e < 2N).
module tb_noise_shaper;

  localparam int unsigned M_W = 32;
  localparam int unsigned V   = 6;

  logic           clk = 1'b0, rst_n, en;
  logic           in_valid;
  logic [V:0]     in_adv;
  logic [M_W-1:0] in_rem, in_n, in_dith;
  logic           out_valid;
  logic [V:0]     out_adv;
  logic           carry;

  noise_shaper dut (.clk(clk), .rst_n(rst_n), .en(en), .in_valid(in_valid),
                    .in_adv(in_adv), .in_rem(in_rem), .in_n(in_n), .in_dith(in_dith),
                    .out_valid(out_valid), .out_adv(out_adv), .carry(carry));

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    #(10 * 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint e = 0;
  longint errsum = 0;   // sum of (r - c*N) at constant N
  int     n_carry = 0;

  // one input per cycle (called at a falling edge), checked one cycle later
  task automatic step(logic v, int unsigned adv, longint r, longint n, longint d);
    int c;
    in_valid = v; in_adv = (V+1)'(adv); in_rem = M_W'(r); in_n = M_W'(n);
    in_dith = M_W'(d);
    c = 0;
    if (!en) e = 0;
    else if (v) begin
      longint s;
      s = e + r;
      if (s + d >= 2 * n) c = 1;
      s -= c * n;
      if (s >= 2 * n) s = 0;
      e = s;
      errsum += r - c * n;
    end
    @(negedge clk);
    checks++;
    if (out_valid != v || int'(out_adv) != int'(adv) + c || carry != (c == 1)) begin
      failures++;
      if (failures < 10) $display("r=%0d n=%0d d=%0d: adv %0d expected %0d", r, n, d, out_adv, adv + c);
    end
    if (c == 1) n_carry++;
  endtask

  initial begin
    longint n;
    rst_n = 1'b0; en = 1'b0; in_valid = 1'b0; in_adv = '0; in_rem = '0; in_n = 32'd1;
    in_dith = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      n = longint'($urandom | 1);
      step(1'($urandom), $urandom_range(0, 63), longint'($urandom) % n, n, 0);
    end
    // no dither, constant N
    en = 1'b1;
    errsum = 0;
    n = longint'(32'hC0DE_1235);
    for (int i = 0; i < 5000; i++) begin
      step(($urandom_range(0, 3) != 0), $urandom_range(0, 64), longint'($urandom) % n, n, 0);
      checks++;
      if (errsum <= -2 * n || errsum >= 2 * n) begin
        failures++; $display("running error %0d/%0d", errsum, n);
      end
    end
    checks++;
    if (e < n) begin failures++; $display("error register %0d did not settle to [N, 2N)", e); end
    // with dither, constant N
    for (int i = 0; i < 5000; i++) begin
      step(($urandom_range(0, 3) != 0), $urandom_range(0, 64), longint'($urandom) % n, n,
           longint'($urandom) % n);
      checks++;
      if (errsum <= -2 * n || errsum >= 2 * n) begin
        failures++; $display("running error with dither %0d/%0d", errsum, n);
      end
    end
    for (int i = 0; i < 3000; i++) begin      // changing N, some shrinking
      n = (i % 3 == 0) ? longint'($urandom_range(1, 100)) : longint'($urandom | 1);
      if (i % 500 == 7) en = 1'b0;
      if (i % 500 == 9) en = 1'b1;
      step(1'($urandom), $urandom_range(0, 64), longint'($urandom) % n, n,
           (i % 2 == 0) ? longint'($urandom) % n : 0);
    end
    checks++;
    if (n_carry == 0) begin failures++; $display("no carry"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
