// decoder: N-to-2^N binary decoder with enable.
//
// When en=1, exactly one output bit, the one numbered by the binary input a,
// is 1. When en=0 all outputs are 0. The register file and the RAM use it to
// turn a register number or word address into a one-hot write select. The
// 2x4 decoder parts in the lecture circuits have active-low outputs and an
// active-low enable. This module is active high throughout; the gates that
// follow it are adapted to match.
//
// Interface: en, a[N], y[2^N]. Purely combinational.
module decoder #(
  parameter int unsigned N = 2
) (
  input  logic              en,
  input  logic [N-1:0]      a,
  output logic [2**N-1:0]   y
);
  always_comb begin
    y = '0;
    if (en) y[a] = 1'b1;
  end
endmodule
