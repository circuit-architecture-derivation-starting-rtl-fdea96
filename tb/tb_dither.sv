// tb_dither: self-checking test of the dither stage.
//
// With en clear the stage must pass (valid, adv, rem, N) unchanged with one
// cycle of latency. With en set every output must satisfy
//   out_adv = in_adv + c, c in {0,1}, and in_rem + d = out_rem + c*N
// for some dither d in [0, N), and out_rem < N. Statistics: for a fixed
// fraction r/N the share of carries must come within 0.03 of r/N over
// 4000 pulses, for three fractions. With en and to_shaper set (noise
// shaping follows) adv and rem must pass unchanged and out_dith must be a
// value below N with a mean near N/2; otherwise out_dith must be 0.
module tb_dither;

  localparam int unsigned M_W = 32;
  localparam int unsigned V   = 6;

  logic           clk = 1'b0, rst_n, en, to_shaper;
  logic           in_valid;
  logic [V:0]     in_adv;
  logic [M_W-1:0] in_rem, in_n;
  logic           out_valid;
  logic [V:0]     out_adv;
  logic [M_W-1:0] out_rem, out_n, out_dith;
  logic           carry;

  dither dut (.clk(clk), .rst_n(rst_n), .en(en), .to_shaper(to_shaper),
              .in_valid(in_valid), .in_adv(in_adv), .in_rem(in_rem), .in_n(in_n),
              .out_valid(out_valid), .out_adv(out_adv), .out_rem(out_rem),
              .out_n(out_n), .out_dith(out_dith), .carry(carry));

  real dsum = 0.0;
  int  dcnt = 0;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    #(10 * 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one input per cycle (called at a falling edge), checked one cycle later
  task automatic step(logic v, int unsigned adv, longint r, longint n, output int c);
    longint d;
    in_valid = v; in_adv = (V+1)'(adv); in_rem = M_W'(r); in_n = M_W'(n);
    @(negedge clk);
    checks++;
    c = int'(out_adv) - int'(adv);
    d = longint'(out_rem) + longint'(c) * n - r;
    if (out_valid != v || out_n != M_W'(n)) begin
      failures++; $display("valid/N not passed");
    end else if (!en || to_shaper) begin
      if (c != 0 || longint'(out_rem) != r || carry) begin
        failures++; $display("bypass changed the data");
      end
      if (!en && out_dith != '0) begin
        failures++; $display("dither value without en");
      end
      if (en && longint'(out_dith) >= n) begin
        failures++; $display("dither value %0d not below N = %0d", out_dith, n);
      end
      if (en) begin dsum += real'(out_dith) / real'(n); dcnt++; end
    end else if (c < 0 || c > 1 || d < 0 || d >= n || longint'(out_rem) >= n ||
                 carry != (v && c == 1) || out_dith != '0) begin
      failures++;
      if (failures < 10) $display("r=%0d n=%0d: c=%0d d=%0d rem=%0d", r, n, c, d, out_rem);
    end
  endtask

  task automatic stat(longint r, longint n);
    int c, ones = 0;
    real p;
    for (int i = 0; i < 4000; i++) begin
      step(1'b1, 5, r, n, c);
      ones += c;
    end
    p = real'(ones) / 4000.0;
    checks++;
    if (p - real'(r) / real'(n) > 0.03 || real'(r) / real'(n) - p > 0.03) begin
      failures++;
      $display("carry share %f for fraction %f", p, real'(r) / real'(n));
    end
  endtask

  initial begin
    int c;
    longint n;
    rst_n = 1'b0; en = 1'b0; to_shaper = 1'b0; in_valid = 1'b0; in_adv = '0; in_rem = '0; in_n = 32'd1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      n = longint'($urandom | 1);
      step(1'($urandom), $urandom_range(0, 63), longint'($urandom) % n, n, c);
    end
    en = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      n = (i % 2 == 0) ? longint'($urandom_range(1, 50)) : longint'($urandom | 1);
      step(1'b1, $urandom_range(0, 64), longint'($urandom) % n, n, c);
    end
    stat(longint'(32'h4000_0000), longint'(32'hFFFF_FFFF));
    stat(longint'(7), longint'(10));
    stat(longint'(1000), longint'(32'h8000_0000));
    // dither handed to the noise shaper
    to_shaper = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      n = longint'($urandom | 1);
      step(1'b1, $urandom_range(0, 64), longint'($urandom) % n, n, c);
    end
    checks++;
    if (dsum / dcnt < 0.45 || dsum / dcnt > 0.55) begin
      failures++; $display("mean dither value %f of N", dsum / dcnt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
