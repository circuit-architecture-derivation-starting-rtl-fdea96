// dither: random rounding of the DDS pulse offset time.
//
// The virtual clock enhancement leaves each pulse with an offset of
// adv + r/N virtual clock ticks, of which only the whole ticks can be
// realised. Dropping the fraction r/N every time repeats the same error
// pattern and leaves discrete spurs. With en set, this stage adds a random
// fraction d/N, d uniform in [0, N), to r: a carry out of the fraction
// (r + d >= N) adds one tick to adv, and r_dith = (r + d) mod N is passed on.
// Truncating the result afterwards rounds up with probability r/N, so the
// mean offset is exact and the error becomes white noise instead of spurs.
//
// d is formed as floor(u*N / 2^M_W) from an M_W-bit slice u of a xorshift
// generator (M_W <= 64). With en clear the stage passes its inputs unchanged
// and out_dith is 0. With en and to_shaper set (noise shaping follows), the
// stage does not round: it passes adv and r unchanged and hands d to the
// noise shaper on out_dith, which uses it only in its rounding decision.
// Every input is registered once: latency 1 cycle, one pulse per cycle.
//
// That a dithering stage sits between the virtual clock enhancement and the
// noise shaping, takes (s_v, r_v) and passes (s_dith, r_dith), follows the
// DDS architecture this design implements; the dither distribution, the
// random generator, the carry arithmetic and handing d to the noise shaper
// are this design's own choices.
module dither #(
  parameter int unsigned M_W  = dds_pkg::M_W_DEFAULT,
  parameter int unsigned V    = dds_pkg::V_DEFAULT,
  parameter logic [63:0] SEED = 64'h9E37_79B9_7F4A_7C15
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           to_shaper,   // noise shaping follows: pass d on
  input  logic           in_valid,
  input  logic [V:0]     in_adv,
  input  logic [M_W-1:0] in_rem,
  input  logic [M_W-1:0] in_n,
  output logic           out_valid,
  output logic [V:0]     out_adv,
  output logic [M_W-1:0] out_rem,
  output logic [M_W-1:0] out_n,
  output logic [M_W-1:0] out_dith,    // d for the noise shaper, else 0
  output logic           carry        // dither carried into adv this cycle
);

  logic [63:0]      rnd;
  logic [M_W-1:0]   u;
  logic [2*M_W-1:0] prod;
  logic [M_W-1:0]   d;
  logic [M_W:0]     sum;
  logic             c;
  logic [M_W:0]     rem_nx;

  xorshift64 #(.SEED(SEED)) u_rng (
    .clk  (clk),
    .rst_n(rst_n),
    .rnd  (rnd)
  );

  always_comb begin
    u      = rnd[M_W-1:0];
    prod   = {{M_W{1'b0}}, u} * {{M_W{1'b0}}, in_n};
    d      = prod[2*M_W-1:M_W];
    sum    = {1'b0, in_rem} + {1'b0, d};
    c      = en && !to_shaper && (sum >= {1'b0, in_n});
    rem_nx = (en && !to_shaper) ? (c ? sum - {1'b0, in_n} : sum) : {1'b0, in_rem};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_adv   <= '0;
      out_rem   <= '0;
      out_n     <= '0;
      out_dith  <= '0;
      carry     <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_adv   <= in_adv + (V+1)'(c);
      out_rem   <= rem_nx[M_W-1:0];
      out_n     <= in_n;
      out_dith  <= (en && to_shaper) ? d : '0;
      carry     <= in_valid && c;
    end
  end

endmodule
