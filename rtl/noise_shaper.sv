// noise_shaper: first-order noise shaping of the DDS pulse offset time.
//
// Each pulse arrives with an offset of adv + r/N virtual clock ticks. With
// en set, the fractions r/N are not dropped but summed in an error register
// e (kept in units of 1/N tick, 0 <= e < 2N): v = e + r is formed, the pulse
// gets one extra tick (c = 1) when v + d >= 2N, and e becomes v - c*N. The
// realised offsets then differ from the exact ones by r/N - c, less than one
// tick per pulse, and the running sum of these errors equals the change of
// e/N, so it stays within two ticks: the timing error is high-pass shaped
// (first-order error feedback) and its power moves away from the carrier.
// d is the dither value from the dither stage (0 without dithering). It
// enters only the decision, not the feedback, so it breaks up the repeating
// patterns a plain first-order loop falls into for rational N/M without
// adding unshaped noise. Without dither the loop settles to N <= e < 2N and
// is the ordinary first-order error feedback. With en clear the error
// register is held at zero and the fraction is dropped (truncation). If N
// shrinks so that e >= 2N, the error is cleared.
//
// Interface: in_* from the dither stage, out_valid/out_adv one cycle later,
// one pulse per cycle. carry marks a pulse that got the extra tick.
//
// Its place at the end of the jitter correction chain, fed with (s_dith,
// r_dith), follows the DDS architecture this design implements; the order
// (first), the error-feedback structure and the use of the dither in the
// decision are this design's own choices.
module noise_shaper #(
  parameter int unsigned M_W = dds_pkg::M_W_DEFAULT,
  parameter int unsigned V   = dds_pkg::V_DEFAULT
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           in_valid,
  input  logic [V:0]     in_adv,
  input  logic [M_W-1:0] in_rem,
  input  logic [M_W-1:0] in_n,
  input  logic [M_W-1:0] in_dith,
  output logic           out_valid,
  output logic [V:0]     out_adv,
  output logic           carry
);

  logic [M_W:0]   err;       // 0 .. 2N-1
  logic [M_W+1:0] v;         // err + r, below 3N
  logic [M_W+1:0] two_n;
  logic           c;
  logic [M_W+1:0] err_nx;

  always_comb begin
    two_n  = {1'b0, in_n, 1'b0};
    v      = {1'b0, err} + {2'b0, in_rem};
    c      = en && in_valid && ((v + {2'b0, in_dith}) >= two_n);
    err_nx = c ? v - {2'b0, in_n} : v;
    if (err_nx >= two_n) err_nx = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err       <= '0;
      out_valid <= 1'b0;
      out_adv   <= '0;
      carry     <= 1'b0;
    end else begin
      if (!en)           err <= '0;
      else if (in_valid) err <= err_nx[M_W:0];
      out_valid <= in_valid;
      out_adv   <= in_adv + (V+1)'(c);
      carry     <= c;
    end
  end

endmodule
