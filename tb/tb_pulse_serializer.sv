// tb_pulse_serializer: self-checking test of the virtual clock serializer.
//
// clk_v runs 2^V = 64 times faster than the reference clock, rising edges
// aligned. Every reference edge a random slot word is presented and
// frame_tgl toggles. Bit s of the word presented at reference edge j must
// appear on s_dds when sampled at virtual tick j*B + s + 2 (one tick of handover
// latency), for every tick of the run.
module tb_pulse_serializer;

  localparam int unsigned V = 6;
  localparam int unsigned B = 1 << V;
  localparam int unsigned FR = 1500;

  logic         clk, clk_v, rst_n;
  logic [B-1:0] slot_word;
  logic         frame_tgl;
  logic         s_dds;

  pulse_serializer dut (.clk_v(clk_v), .rst_n(rst_n), .slot_word(slot_word),
                        .frame_tgl(frame_tgl), .s_dds(s_dds));

  int checks = 0, failures = 0;

  initial begin clk_v = 1'b0; forever #1 clk_v = ~clk_v; end
  initial begin
    clk = 1'b0;
    #1;
    forever begin clk = 1'b1; #(B); clk = 1'b0; #(B); end
  end

  initial begin
    #(2 * B * (FR + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit     expect_bits[(FR + 8) * B];
  bit     checked[(FR + 8) * B];
  int     fr = 0;
  longint tick = 0;
  bit     running = 1'b0;
  int     n_ones = 0;

  // reference clock domain: new word each period
  always @(posedge clk) begin
    if (running) begin
      logic [B-1:0] w;
      w = {$urandom, $urandom};
      w = w & {$urandom, $urandom};   // sparse
      // clk_v rising edges are at odd times: tick index ($time - 1) / 2
      for (int s = 0; s < int'(B); s++) begin
        expect_bits[($time - 1) / 2 + s + 2] = w[s];
        checked[($time - 1) / 2 + s + 2]     = 1'b1;
      end
      slot_word <= w;
      frame_tgl <= ~frame_tgl;
      fr++;
    end
  end

  always @(posedge clk_v) begin
    if (running) begin
      // s_dds sampled here was set at the previous tick edge
      tick = ($time - 1) / 2;
      if (tick < longint'((FR + 8) * B) && checked[tick]) begin
        checks++;
        if (s_dds != expect_bits[tick]) begin
          failures++;
          if (failures < 10) $display("tick %0d: s_dds %b expected %b", tick, s_dds, expect_bits[tick]);
        end
        if (s_dds) n_ones++;
      end
    end
  end

  initial begin
    rst_n = 1'b0; slot_word = '0; frame_tgl = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    running = 1'b1;
    wait (fr == int'(FR) + 1);
    repeat (2) @(posedge clk);
    checks++;
    if (n_ones < 100) begin failures++; $display("too few pulses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
