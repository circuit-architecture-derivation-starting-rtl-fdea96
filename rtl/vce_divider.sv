// vce_divider: virtual clock enhancement of the pulse output DDS.
//
// At an overflow the accumulator remainder r tells how far the true phase
// crossing lies before the clock edge: r/N of a reference period. On a
// virtual clock grid of B = 2^V ticks per reference period that is
// q = floor(r*B/N) whole ticks plus the fraction r_v/N of a tick, with
// r_v = (r*B) mod N. This block computes q and r_v by restoring division,
// one quotient bit per pipeline stage, so a new overflow can enter every
// cycle (overflows come in consecutive cycles when N > M/2).
//
// Interface: in_valid/in_rem/in_n come from pulse_dds (in_rem < in_n is
// required). out_valid/out_adv/out_rem/out_n appear V cycles later; out_adv
// is q (0..B-1) in V+1 bits so that later stages can add a carry, out_rem is
// r_v, and out_n is the N belonging to this pulse.
//
// Dividing the remainder by N to get a v-bit offset time is the virtual
// clock enhancement this design implements; the restoring algorithm and the
// one-bit-per-stage pipeline are this design's own choices.
module vce_divider #(
  parameter int unsigned M_W = dds_pkg::M_W_DEFAULT,
  parameter int unsigned V   = dds_pkg::V_DEFAULT
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [M_W-1:0] in_rem,
  input  logic [M_W-1:0] in_n,
  output logic           out_valid,
  output logic [V:0]     out_adv,
  output logic [M_W-1:0] out_rem,
  output logic [M_W-1:0] out_n
);

  // Pipeline registers: stage i (1..V) holds the state after i quotient
  // bits have been produced.
  logic           vld_q [1:V];
  logic [M_W-1:0] prem_q[1:V];
  logic [M_W-1:0] divn_q[1:V];
  logic [V-1:0]   quo_q [1:V];

  // Input of restoring step i (stage 0 is the block input) and its result.
  logic           vld_s [V];
  logic [M_W-1:0] prem_s[V];
  logic [M_W-1:0] divn_s[V];
  logic [V-1:0]   quo_s [V];
  logic [M_W:0]   shifted[V];
  logic [M_W-1:0] prem_nx[V];
  logic           qbit   [V];

  always_comb begin
    for (int i = 0; i < V; i++) begin
      if (i == 0) begin
        vld_s[i]  = in_valid;
        prem_s[i] = in_rem;
        divn_s[i] = in_n;
        quo_s[i]  = '0;
      end else begin
        vld_s[i]  = vld_q[i];
        prem_s[i] = prem_q[i];
        divn_s[i] = divn_q[i];
        quo_s[i]  = quo_q[i];
      end
      shifted[i] = {prem_s[i], 1'b0};
      qbit[i]    = (shifted[i] >= {1'b0, divn_s[i]});
      prem_nx[i] = qbit[i] ? M_W'(shifted[i] - {1'b0, divn_s[i]})
                           : shifted[i][M_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= V; i++) begin
        vld_q[i]  <= 1'b0;
        prem_q[i] <= '0;
        divn_q[i] <= '0;
        quo_q[i]  <= '0;
      end
    end else begin
      for (int i = 0; i < V; i++) begin
        vld_q[i+1]  <= vld_s[i];
        prem_q[i+1] <= prem_nx[i];
        divn_q[i+1] <= divn_s[i];
        quo_q[i+1]  <= V'({quo_s[i], qbit[i]});
      end
    end
  end

  assign out_valid = vld_q[V];
  assign out_adv   = {1'b0, quo_q[V]};
  assign out_rem   = prem_q[V];
  assign out_n     = divn_q[V];

endmodule
