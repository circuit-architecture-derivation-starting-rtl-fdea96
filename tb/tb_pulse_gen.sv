// tb_pulse_gen: self-checking test of the slot scheduler.
//
// Pulses with random advances 0..B+1 (B = 64) enter at random cycles. The
// model marks absolute slot j*B + 2*B - adv for a pulse taken in at edge j;
// the slot_word presented after edge j must equal the model's slots
// j*B .. j*B+B-1. frame_tgl must toggle every cycle.
module tb_pulse_gen;

  localparam int unsigned V = 6;
  localparam int unsigned B = 1 << V;
  localparam int unsigned CYC = 5000;

  logic         clk = 1'b0, rst_n;
  logic         in_valid;
  logic [V:0]   in_adv;
  logic [B-1:0] slot_word;
  logic         frame_tgl;

  pulse_gen dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_adv(in_adv),
                 .slot_word(slot_word), .frame_tgl(frame_tgl));

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    #(10 * 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit timeline[(CYC + 4) * B];
  int j = 0;
  logic prev_tgl;
  int n_pulse = 0;
  bit started = 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      started <= 1'b1;
      if (in_valid) begin
        timeline[j * B + 2 * B - int'(in_adv)] = 1'b1;
        n_pulse++;
      end
    end
  end

  always @(negedge clk) begin
    if (started) begin
      logic [B-1:0] exp_w;
      for (int s = 0; s < int'(B); s++) exp_w[s] = timeline[j * B + s];
      checks++;
      if (slot_word != exp_w || frame_tgl == prev_tgl) begin
        failures++;
        if (failures < 10) $display("cycle %0d: word %h expected %h", j, slot_word, exp_w);
      end
      prev_tgl = frame_tgl;
      j++;
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_adv = '0;
    repeat (2) @(negedge clk);
    prev_tgl = frame_tgl;
    rst_n = 1'b1;
    // pulses at least two cycles apart so no two share a slot
    for (int i = 0; i < int'(CYC); i++) begin
      @(negedge clk);
      in_valid = (i % 2 == 0) && ($urandom_range(0, 3) != 0);
      in_adv   = (V+1)'($urandom_range(0, B + 1));
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_pulse < 100) begin failures++; $display("too few pulses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
