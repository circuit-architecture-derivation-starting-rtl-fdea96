// pulse_gen: places corrected DDS pulses on the virtual clock grid.
//
// A pulse that arrives with advance adv should have happened adv virtual
// clock ticks (of B = 2^V per reference period) before its reference edge.
// Since the past cannot be changed, every pulse is delayed by the same two
// reference periods: it is scheduled 2*B - adv slots after the reference
// edge at which it is taken in. adv is at most B+1 (B-1 from the division,
// plus one carry each from dithering and noise shaping), so the slot lies
// between B-1 and 2*B. A 3*B-slot schedule holds the pending pulses and
// shifts by B slots every period; its lowest B slots become slot_word, in
// which bit s set means: output edge in virtual slot s of the coming period.
// frame_tgl toggles with every new slot_word, for the serializer on the
// virtual clock. Two pulses in one slot merge (possible only for B = 2).
//
// Interface timing: in_valid/in_adv are sampled at a clk edge; slot_word
// and frame_tgl change at that edge. Generating the corrected pulse
// sequence on the virtual clock grid follows the DDS architecture this
// design implements; the slot-word scheduling and the fixed delay are this
// design's own choices.
module pulse_gen #(
  parameter int unsigned V = dds_pkg::V_DEFAULT
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [V:0]         in_adv,
  output logic [(1<<V)-1:0]  slot_word,
  output logic               frame_tgl
);

  localparam int unsigned B = 1 << V;

  logic [2*B-1:0] pending;
  logic [3*B-1:0] sched;

  always_comb begin
    sched = {{B{1'b0}}, pending};
    if (in_valid) sched = sched | ((3*B)'(1) << (2*B - int'(in_adv)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending   <= '0;
      slot_word <= '0;
      frame_tgl <= 1'b0;
    end else begin
      pending   <= sched[3*B-1:B];
      slot_word <= sched[B-1:0];
      frame_tgl <= ~frame_tgl;
    end
  end

  a_adv_range : assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (int'(in_adv) <= B + 1));

endmodule
