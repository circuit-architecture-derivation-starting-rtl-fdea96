// xorshift64: free-running 64-bit xorshift pseudo-random generator.
//
// The state advances once per clock by three shift-xor steps (13, 7, 17),
// which walk through all 2^64-1 non-zero values. The full state is the output
// word. It is the random source of the dither stage; the generator type is
// this design's choice. SEED must be non-zero; the state is loaded with it on
// reset.
module xorshift64 #(
  parameter logic [63:0] SEED = 64'h9E37_79B9_7F4A_7C15
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [63:0] rnd
);

  logic [63:0] s1, s2, s3;

  always_comb begin
    s1 = rnd ^ (rnd << 13);
    s2 = s1 ^ (s1 >> 7);
    s3 = s2 ^ (s2 << 17);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rnd <= SEED;
    else        rnd <= s3;
  end

endmodule
