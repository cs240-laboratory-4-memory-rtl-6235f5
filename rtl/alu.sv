// alu: arithmetic/logic unit of the CPU datapath.
//
// Input A is always Rs; input B is Rt or the sign-extended offset (chosen
// outside). The 4-bit alu_op selects add, subtract, AND, OR or set-less-than.
// SLT compares A and B as signed two's-complement numbers and returns 1 or 0.
// Codes that name no operation give 0. zero is 1 when the result is 0; BEQ uses
// it after a subtraction. Add and subtract wrap around modulo 2^WIDTH. The
// lecture names the operations and the Zero output; the encoding and the signed
// compare are this design's own.
//
// Interface: a, b, alu_op, result, zero. Purely combinational.
module alu
  import cpu_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  aluop_e           alu_op,
  output logic [WIDTH-1:0] result,
  output logic             zero
);
  always_comb begin
    unique case (alu_op)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_SLT: result = ($signed(a) < $signed(b)) ? WIDTH'(1) : '0;
      default: result = '0;
    endcase
  end

  assign zero = (result == '0);
endmodule
