// cpu_pkg: types and constants shared by the CPU blocks.
//
// Instruction format (16 bits): op[15:12], rs[11:8], rt[7:4], rd/offset[3:0];
// JMP uses [11:0] as a 12-bit word offset. Opcodes follow the instruction-set
// table of the lecture. SLT is listed among the R-type instructions there but
// is given no opcode; this design gives it 0110, the one unused code between OR
// (0101) and BEQ (0111). The ALU operation codes reuse the R-type opcodes.
package cpu_pkg;
  localparam int unsigned XLEN = 16;  // data bus and register width
  localparam int unsigned ALEN = 8;   // address bus and PC width

  typedef enum logic [3:0] {
    OP_LW  = 4'b0000,
    OP_SW  = 4'b0001,
    OP_ADD = 4'b0010,
    OP_SUB = 4'b0011,
    OP_AND = 4'b0100,
    OP_OR  = 4'b0101,
    OP_SLT = 4'b0110,
    OP_BEQ = 4'b0111,
    OP_JMP = 4'b1000
  } opcode_e;

  typedef enum logic [3:0] {
    ALU_ADD = 4'b0010,
    ALU_SUB = 4'b0011,
    ALU_AND = 4'b0100,
    ALU_OR  = 4'b0101,
    ALU_SLT = 4'b0110
  } aluop_e;

  typedef struct packed {
    logic   reg_dst;    // 1: write register is Rd, 0: Rt (LW)
    logic   alu_src;    // 1: ALU input B is the sign-extended offset, 0: Rt
    logic   reg_write;  // write the register file
    logic   mem_write;  // write data memory (SW)
    logic   mem_to_reg; // 1: write-back value from data memory (LW)
    logic   branch;     // BEQ
    logic   jump;       // JMP
    aluop_e alu_op;
  } ctrl_t;

  typedef struct packed {
    logic [3:0] op;
    logic [3:0] rs;
    logic [3:0] rt;
    logic [3:0] rd;
  } instr_t;
endpackage
