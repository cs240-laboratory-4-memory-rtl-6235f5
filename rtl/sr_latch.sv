// sr_latch: set/reset latch with the behaviour of two cross-coupled NOR gates.
//
// The NOR pair stores one bit. S=1,R=0 sets Q, S=0,R=1 clears Q, S=R=0 keeps
// the stored bit. With S=R=1 both NOR outputs are forced low, so q and q_n are
// both 0 while that input lasts. This is the classic NOR latch truth table.
// A real NOR pair settles unpredictably when S=R=1 is released. This model
// instead keeps the bit stored before S=R=1 was applied. That is this design's
// own choice, because a two-valued simulation cannot show metastability.
//
// It is written as one level-sensitive storage element (always_latch) plus
// output gating, not as a gate loop, so that the tools see a latch rather than
// a combinational loop. The latch that the tools report is intended.
//
// Interface: s, r (active high), q, q_n. There is no clock. Outputs follow the
// inputs combinationally.
module sr_latch (
  input  logic s,
  input  logic r,
  output logic q,
  output logic q_n
);
  logic state;

  // The stored bit changes only while exactly one of S and R is asserted.
  always_latch begin
    if (s ^ r) state = s;
  end

  // Output of each NOR gate: forced low by its own input, else the stored value.
  assign q   = ~r & (s | state);
  assign q_n = ~s & (r | ~state);
endmodule
