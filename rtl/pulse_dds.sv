// pulse_dds: phase accumulator of a pulse output DDS.
//
// Every reference clock cycle the control word N is added to the m-bit
// accumulator, modulo M. When the sum reaches M the accumulator wraps and an
// overflow pulse is issued; the overflow pulses repeat with the mean
// frequency f_DDS = N/M * f_c. Because the true phase crossing lies between
// two clock edges, each pulse comes late by r/N of a clock period, where r is
// the accumulator value left after the wrap. That remainder is output with
// the pulse so that the jitter correction stages can compute the exact time.
//
// Interface: n_word = N, m_mod = M (m+1 bits so that M = 2^m is allowed,
// N < M <= 2^m). ov is registered (one cycle per overflow), rem is the
// accumulator value in the same cycle (equal to r when ov is set, and always
// below N then), n_out is the N that produced the step.
//
// The adder/register loop with a registered overflow follows the DDS
// architecture this design implements. Taking a general modulus M rather than
// only 2^m, the asynchronous active-low reset to zero, and restarting from
// zero if M is lowered below the accumulator value are this design's own
// choices. N and M may change at any cycle; the phase continues from the
// current accumulator value.
module pulse_dds #(
  parameter int unsigned M_W = dds_pkg::M_W_DEFAULT
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [M_W-1:0] n_word,
  input  logic [M_W:0]   m_mod,
  output logic           ov,
  output logic [M_W-1:0] rem,
  output logic [M_W-1:0] n_out
);

  logic [M_W-1:0] acc;
  logic [M_W:0]   sum;
  logic [M_W:0]   acc_next;
  logic           ov_next;

  always_comb begin
    sum      = {1'b0, acc} + {1'b0, n_word};
    ov_next  = 1'b0;
    acc_next = sum;
    if ({1'b0, acc} >= m_mod) begin
      // M was lowered below the current phase: restart from zero.
      acc_next = '0;
    end else if (sum >= m_mod) begin
      ov_next  = 1'b1;
      acc_next = sum - m_mod;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc   <= '0;
      ov    <= 1'b0;
      n_out <= '0;
    end else begin
      acc   <= acc_next[M_W-1:0];
      ov    <= ov_next;
      n_out <= n_word;
    end
  end

  assign rem = acc;

  // The remainder after an overflow is below N whenever N < M held.
  a_rem_below_n : assert property (@(posedge clk) disable iff (!rst_n)
    ov |-> (rem < n_out));

endmodule
