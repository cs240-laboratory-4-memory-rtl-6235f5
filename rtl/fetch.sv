// fetch: instruction fetch unit: program counter, +2 adder, instruction memory.
//
// The PC is an 8-bit byte address. reset (asynchronous, active high) sets it to
// 0, where every program starts. Each instruction is a 16-bit word, so the PC
// normally advances by 2. The next PC is:
//   jump               offset12 * 2 (the absolute word address, cut to 8 bits)
//   branch_taken       PC + 2 + sign-extended offset4 * 2
//   otherwise          PC + 2
// all modulo 256. The lecture gives the PC, the adder and the BEQ/JMP rules;
// the selection logic is written here in the simplest form.
//
// The instruction memory holds 2^(PC_W-1) words, one for each even byte address,
// and is read combinationally at PC[PC_W-1:1]. This design's own choice: it is
// written through a load port (load_we, load_addr as a byte address,
// load_data) so that a program can be placed before reset is released.
//
// Interface: clk, reset, branch_taken, jump, instr (out), pc (out), load port.
// branch_taken and jump are decoded from instr in the same cycle.
// Timing: PC updates at each rising clk edge while reset is low.
module fetch
  import cpu_pkg::*;
#(
  parameter int unsigned PC_W = 8
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            branch_taken,
  input  logic            jump,
  output logic [XLEN-1:0] instr,
  output logic [PC_W-1:0] pc,
  input  logic            load_we,
  input  logic [PC_W-1:0] load_addr,
  input  logic [XLEN-1:0] load_data
);
  logic [PC_W-1:0]   pc_next;
  logic [PC_W-1:0]   pc_plus2;
  logic [PC_W-1:0]   br_target;
  logic [PC_W-1:0]   jmp_target;
  logic [PC_W-2:0]   imem_addr;
  logic [XLEN-1:0]   imem_dout;

  nbit_register #(.WIDTH(PC_W)) u_pc (
    .clk(clk),
    .clr(reset),
    .en (1'b1),
    .d  (pc_next),
    .q  (pc)
  );

  assign pc_plus2   = pc + PC_W'(2);
  // 4-bit offset in instr[3:0], sign-extended and doubled.
  assign br_target  = pc_plus2 + PC_W'({{(PC_W-5){instr[3]}}, instr[3:0], 1'b0});
  // 12-bit offset in instr[11:0], doubled and cut to the PC width.
  assign jmp_target = PC_W'({instr[11:0], 1'b0});

  always_comb begin
    if (jump)              pc_next = jmp_target;
    else if (branch_taken) pc_next = br_target;
    else                   pc_next = pc_plus2;
  end

  // Program loading writes; fetching reads at the current PC.
  assign imem_addr = load_we ? load_addr[PC_W-1:1] : pc[PC_W-1:1];

  ram #(.ADDR_W(PC_W-1), .DATA_W(XLEN)) u_imem (
    .clk (clk),
    .we_n(~load_we),
    .oe_n(1'b0),
    .addr(imem_addr),
    .din (load_data),
    .dout(imem_dout)
  );

  assign instr = imem_dout;
endmodule
