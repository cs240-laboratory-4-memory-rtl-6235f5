// control: main decoder of the single-cycle CPU.
//
// Maps the 4-bit opcode to the datapath controls:
//   LW       RegWrite, RegDst=0 (Rt), ALUSrc=1, MemToReg, ALU add
//   SW       MemWrite, ALUSrc=1, ALU add
//   ADD..SLT RegWrite, RegDst=1 (Rd), ALUSrc=0, ALU op = opcode
//   BEQ      Branch, ALUSrc=0, ALU subtract (Zero flags Rs = Rt)
//   JMP      Jump
// The codes 1001-1111 are unused. They decode to no operation: nothing is
// written and the PC advances by 2. That is this design's choice.
//
// Interface: op (4 bits), ctrl (ctrl_t). Purely combinational.
module control
  import cpu_pkg::*;
(
  input  logic [3:0] op,
  output ctrl_t      ctrl
);
  always_comb begin
    ctrl = '{reg_dst: 1'b0, alu_src: 1'b0, reg_write: 1'b0, mem_write: 1'b0,
             mem_to_reg: 1'b0, branch: 1'b0, jump: 1'b0, alu_op: ALU_ADD};
    case (op)
      OP_LW: begin
        ctrl.reg_write  = 1'b1;
        ctrl.alu_src    = 1'b1;
        ctrl.mem_to_reg = 1'b1;
      end
      OP_SW: begin
        ctrl.mem_write = 1'b1;
        ctrl.alu_src   = 1'b1;
      end
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_SLT: begin
        ctrl.reg_write = 1'b1;
        ctrl.reg_dst   = 1'b1;
        ctrl.alu_op    = aluop_e'(op);
      end
      OP_BEQ: begin
        ctrl.branch = 1'b1;
        ctrl.alu_op = ALU_SUB;
      end
      OP_JMP: ctrl.jump = 1'b1;
      default: ;
    endcase
  end
endmodule
