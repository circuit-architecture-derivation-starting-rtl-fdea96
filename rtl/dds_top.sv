// dds_top: pulse output DDS with jitter correction.
//
// The phase accumulator (pulse_dds) produces an overflow pulse at the mean
// rate f_DDS = N/M * f_c, each late by a fraction of a reference period that
// its remainder r encodes. The jitter correction chain then works out when
// the pulse should have come: the virtual clock enhancement (vce_divider)
// turns r/N into an offset of whole ticks of the virtual clock
// f_c,v = 2^V * f_c plus a remainder; dithering (dither) and noise shaping
// (noise_shaper) decide, when selected, how that remainder is rounded; and
// pulse_gen and pulse_serializer emit the corrected pulse on the virtual
// clock as s_dds.
//
// Ports: clk is the reference clock f_c, clk_v the virtual clock (exactly
// 2^V times clk, rising edges aligned); n_word = N and m_mod = M with
// N < M <= 2^M_W; dith_en and ns_en select the optional stages at run time.
// s_ov is the uncorrected overflow pulse (one clk cycle), slot_word the
// corrected pulse positions of the current reference period, s_dds the
// corrected pulse (one clk_v tick). From an overflow at s_ov to its slot in
// slot_word the delay is V+5 reference periods minus the advance.
//
// With both optional stages selected, the dither stage does not round by
// itself but hands its random value to the noise shaper, which uses it in
// its rounding decision only (dithered noise shaping).
//
// The chain and the signals passed between its stages follow the DDS
// architecture this design implements; run-time enables for the optional
// stages and the way dithering and noise shaping combine are this design's
// choices.
module dds_top #(
  parameter int unsigned M_W = dds_pkg::M_W_DEFAULT,
  parameter int unsigned V   = dds_pkg::V_DEFAULT
) (
  input  logic              clk,
  input  logic              clk_v,
  input  logic              rst_n,
  input  logic [M_W-1:0]    n_word,
  input  logic [M_W:0]      m_mod,
  input  logic              dith_en,
  input  logic              ns_en,
  output logic              s_ov,
  output logic [(1<<V)-1:0] slot_word,
  output logic              s_dds
);

  // Pulse output DDS -> virtual clock enhancement: s_ov, r, N
  logic [M_W-1:0] r, n_ov;
  // Virtual clock enhancement -> dithering: s_v, q, r_v, N
  logic           s_v;
  logic [V:0]     adv_v;
  logic [M_W-1:0] r_v, n_v;
  // Dithering -> noise shaping: s_dith, offset, r_dith, N, dither value
  logic           s_dith;
  logic [V:0]     adv_dith;
  logic [M_W-1:0] r_dith, n_dith, d_dith;
  logic           dith_carry;
  // Noise shaping -> pulse generation
  logic           s_ns;
  logic [V:0]     adv_ns;
  logic           ns_carry;
  logic           frame_tgl;

  pulse_dds #(.M_W(M_W)) u_acc (
    .clk   (clk),
    .rst_n (rst_n),
    .n_word(n_word),
    .m_mod (m_mod),
    .ov    (s_ov),
    .rem   (r),
    .n_out (n_ov)
  );

  vce_divider #(.M_W(M_W), .V(V)) u_vce (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s_ov),
    .in_rem   (r),
    .in_n     (n_ov),
    .out_valid(s_v),
    .out_adv  (adv_v),
    .out_rem  (r_v),
    .out_n    (n_v)
  );

  dither #(.M_W(M_W), .V(V)) u_dith (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (dith_en),
    .to_shaper(ns_en),
    .in_valid (s_v),
    .in_adv   (adv_v),
    .in_rem   (r_v),
    .in_n     (n_v),
    .out_valid(s_dith),
    .out_adv  (adv_dith),
    .out_rem  (r_dith),
    .out_n    (n_dith),
    .out_dith (d_dith),
    .carry    (dith_carry)
  );

  noise_shaper #(.M_W(M_W), .V(V)) u_ns (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (ns_en),
    .in_valid (s_dith),
    .in_adv   (adv_dith),
    .in_rem   (r_dith),
    .in_n     (n_dith),
    .in_dith  (d_dith),
    .out_valid(s_ns),
    .out_adv  (adv_ns),
    .carry    (ns_carry)
  );

  pulse_gen #(.V(V)) u_gen (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s_ns),
    .in_adv   (adv_ns),
    .slot_word(slot_word),
    .frame_tgl(frame_tgl)
  );

  pulse_serializer #(.V(V)) u_ser (
    .clk_v    (clk_v),
    .rst_n    (rst_n),
    .slot_word(slot_word),
    .frame_tgl(frame_tgl),
    .s_dds    (s_dds)
  );

endmodule
