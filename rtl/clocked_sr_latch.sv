// clocked_sr_latch: level-sensitive SR latch with a clock (enable) input.
//
// S and R each pass through a 2-input AND gate with CK before reaching a NOR
// SR latch, as in the lecture circuit. While CK is 1 the output follows S and R
// like a plain SR latch. While CK is 0 both latch inputs are held at 0 and the
// latch remembers its value. S=R=1 while CK=1 drives both outputs to 0, as in
// the NOR latch. The stored bit then keeps its earlier value (see sr_latch).
//
// Interface: ck, s, r (active high), q, q_n. No edge timing: the output changes
// at any time during which CK is high.
module clocked_sr_latch (
  input  logic ck,
  input  logic s,
  input  logic r,
  output logic q,
  output logic q_n
);
  logic s_g, r_g;

  assign s_g = s & ck;
  assign r_g = r & ck;

  sr_latch u_latch (
    .s  (s_g),
    .r  (r_g),
    .q  (q),
    .q_n(q_n)
  );
endmodule
