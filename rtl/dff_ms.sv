// dff_ms: master-slave D flip-flop made of two D latches.
//
// The master latch is transparent while CK is 1. The slave latch gets the
// inverted clock, so it is transparent while CK is 0, and it copies the master.
// The value that D has when CK falls from 1 to 0 is therefore held by the master
// and appears at Q. Q changes only at the falling edge of CK. This follows the
// lecture's two-latch circuit and its statement that the flip-flop changes only
// at the high-to-low transition. The lecture's waveform exercise speaks of the
// positive edge instead; the register and the CPU in this design use ordinary
// rising-edge flip-flops.
//
// The asynchronous set and reset pins of the latches in the circuit are tied
// inactive there, so this module leaves them out.
//
// Interface: ck, d, q, q_n. Timing: falling-edge triggered.
module dff_ms (
  input  logic ck,
  input  logic d,
  output logic q,
  output logic q_n
);
  logic m_q, m_qn;

  d_latch u_master (
    .c  (ck),
    .d  (d),
    .q  (m_q),
    .q_n(m_qn)
  );

  d_latch u_slave (
    .c  (~ck),
    .d  (m_q),
    .q  (q),
    .q_n(q_n)
  );
endmodule
