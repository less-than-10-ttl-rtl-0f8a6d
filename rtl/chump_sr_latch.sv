// chump_sr_latch: debounced manual clock of the CHUMP machine.
//
// A two-way toggle switch grounds one of two inputs, each pulled up. The
// inputs drive an RS latch of two cross-coupled NAND gates, with active-low
// set (s_n) and reset (r_n). Throwing the switch to the set side makes q 1;
// throwing it to the reset side makes q 0. While a contact bounces, its
// input returns to 1 for short moments. A 1 on both inputs holds the
// latch, so each throw gives exactly one clean edge on q, the machine clock.
//
// Behaviour for each input pair, as for the NAND latch:
//   s_n r_n | q  q_n
//    0   1  | 1  0
//    1   0  | 0  1
//    1   1  | hold
//    0   0  | 1  1   (both pulled low; the switch cannot do this)
// The stored state is an always_latch, so tools report a latch here; that
// latch is the circuit. This is the design from the CHUMP description's
// manual clock; it has no reset, as there.
module chump_sr_latch (
  input  logic s_n,
  input  logic r_n,
  output logic q,
  output logic q_n
);

  logic state;

  always_latch begin
    if (s_n != r_n) state = r_n;
  end

  assign q   = !s_n | (r_n & state);
  assign q_n = !r_n | (s_n & !state);

endmodule
