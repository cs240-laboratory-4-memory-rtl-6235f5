// d_latch: level-sensitive D latch.
//
// Built as in the lecture circuit: a clocked SR latch whose set input is D and
// whose reset input is the inverse of D. One data input means that the forbidden
// S=R=1 case cannot occur. While C is 1, Q follows D (transparent). While C is
// 0, Q holds the last value that D had while C was 1.
//
// Interface: c (enable/clock, active high), d, q, q_n.
module d_latch (
  input  logic c,
  input  logic d,
  output logic q,
  output logic q_n
);
  clocked_sr_latch u_srl (
    .ck (c),
    .s  (d),
    .r  (~d),
    .q  (q),
    .q_n(q_n)
  );
endmodule
