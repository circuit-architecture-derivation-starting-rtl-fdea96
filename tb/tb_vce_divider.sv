// tb_vce_divider: self-checking test of the virtual clock enhancement
// divider. Random (r, N) pairs with r < N enter on random cycles, including
// back-to-back; each result must appear exactly V cycles later with
// q = floor(r*2^V/N) and r_v = (r*2^V) mod N, computed here with 64-bit
// arithmetic. Also checks N near 2^32, r = 0 and r = N-1.
module tb_vce_divider;

  localparam int unsigned M_W = 32;
  localparam int unsigned V   = 6;

  logic           clk = 1'b0, rst_n;
  logic           in_valid;
  logic [M_W-1:0] in_rem, in_n;
  logic           out_valid;
  logic [V:0]     out_adv;
  logic [M_W-1:0] out_rem, out_n;

  vce_divider dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_rem(in_rem),
                   .in_n(in_n), .out_valid(out_valid), .out_adv(out_adv),
                   .out_rem(out_rem), .out_n(out_n));

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    #(10 * 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { longint r; longint n; int cyc; } job_t;
  job_t q[$];
  int cyc = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (in_valid) begin
        job_t j;
        j.r = longint'(in_rem); j.n = longint'(in_n); j.cyc = cyc;
        q.push_back(j);
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      job_t j;
      longint num;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("unexpected result");
      end else begin
        j = q.pop_front();
        num = j.r << V;
        if (longint'(out_adv) != num / j.n || longint'(out_rem) != num % j.n ||
            longint'(out_n) != j.n || cyc - j.cyc != int'(V) - 1) begin
          failures++;
          if (failures < 10)
            $display("r=%0d n=%0d: q=%0d/%0d rv=%0d/%0d latency %0d", j.r, j.n,
                     out_adv, num / j.n, out_rem, num % j.n, cyc - j.cyc + 1);
        end
      end
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_rem = '0; in_n = 32'd1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20000; i++) begin
      int sel_n, sel_r;
      sel_n = int'($urandom_range(0, 3));
      sel_r = int'($urandom_range(0, 3));
      @(negedge clk);
      in_valid = ($urandom_range(0, 2) != 0);
      case (sel_n)
        0: in_n = M_W'($urandom_range(1, 1000));
        1: in_n = M_W'(32'hFFFF_FFFF - $urandom_range(0, 1000));
        default: in_n = M_W'($urandom | 1);
      endcase
      case (sel_r)
        0: in_rem = '0;
        1: in_rem = in_n - 1;
        default: in_rem = M_W'(longint'($urandom) % longint'(in_n));
      endcase
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (V + 2) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
