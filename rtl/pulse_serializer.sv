// pulse_serializer: emits the corrected DDS pulse sequence on the virtual
// clock.
//
// Runs on clk_v, the virtual clock f_c,v = B * f_c with B = 2^V, whose
// rising edges include every rising edge of the reference clock. Each
// reference period pulse_gen presents a B-bit slot_word and toggles
// frame_tgl. On the first clk_v edge at which frame_tgl differs from the
// last value seen, the word is taken in and its bit 0 is output; the
// following B-1 edges output bits 1..B-1. s_dds is therefore high for one
// virtual tick per pulse, one virtual tick after the slot the word names
// (a constant latency that does not change the pulse spacing).
//
// The output sequence being generated at the virtual clock rate follows the
// DDS architecture this design implements; a real clock at B times the
// reference rate and the toggle handover are this design's own choices.
module pulse_serializer #(
  parameter int unsigned V = dds_pkg::V_DEFAULT
) (
  input  logic              clk_v,
  input  logic              rst_n,
  input  logic [(1<<V)-1:0] slot_word,
  input  logic              frame_tgl,
  output logic              s_dds
);

  localparam int unsigned B = 1 << V;

  logic         seen;
  logic [B-1:0] shreg;
  logic [V-1:0] since_load;   // ticks since the last word was taken in
  logic         loaded_once;
  logic         load;

  assign load = (frame_tgl != seen);

  always_ff @(posedge clk_v or negedge rst_n) begin
    if (!rst_n) begin
      seen        <= 1'b0;
      shreg       <= '0;
      s_dds       <= 1'b0;
      since_load  <= '0;
      loaded_once <= 1'b0;
    end else if (load) begin
      seen        <= frame_tgl;
      s_dds       <= slot_word[0];
      shreg       <= slot_word >> 1;
      since_load  <= '0;
      loaded_once <= 1'b1;
    end else begin
      s_dds       <= shreg[0];
      shreg       <= shreg >> 1;
      since_load  <= since_load + 1'b1;
    end
  end

  // A new word must come exactly every B virtual ticks.
  a_frame_rate : assert property (@(posedge clk_v) disable iff (!rst_n)
    (load && loaded_once) |-> (since_load == V'(B - 1)));

endmodule
