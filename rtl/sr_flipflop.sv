// sr_flipflop: edge-triggered SR flip-flop.
//
// The lecture's second waveform exercise uses an SR element whose output changes
// only on the positive edge of the clock. At each rising edge of ck: S=1,R=0
// sets Q; S=0,R=1 clears Q; S=R=0 keeps Q. The lecture gives no result for
// S=R=1 at an edge. This design keeps Q unchanged then.
//
// Interface: ck, s, r, q, q_n (q_n is always the inverse of q).
module sr_flipflop (
  input  logic ck,
  input  logic s,
  input  logic r,
  output logic q,
  output logic q_n
);
  always_ff @(posedge ck) begin
    unique case ({s, r})
      2'b10:   q <= 1'b1;
      2'b01:   q <= 1'b0;
      default: q <= q;
    endcase
  end

  assign q_n = ~q;
endmodule
