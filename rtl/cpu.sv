// cpu: single-cycle 16-bit processor of the lecture's HW instruction set.
//
// Every instruction completes in one clock cycle. Fetch reads the word at PC.
// Control decodes the opcode. The register file reads Rs and Rt. The ALU adds,
// subtracts, ANDs, ORs or compares Rs with either Rt or the sign-extended 4-bit
// offset (ALUSrc mux). The result is written to Rd, or to Rt for LW (RegDst
// mux), at the next rising edge. LW and SW use Rs + offset as the data-memory
// address. SW stores Rt. LW writes the memory word to Rt through a write-back
// mux, which the lecture implies but does not draw. BEQ subtracts and uses the
// ALU's Zero output to choose PC + 2 + offset*2. JMP loads PC with offset*2.
// R0 = 0 and R1 = 1 are constants.
//
// The data memory is a 256 x 16 RAM addressed by the low 8 bits of the ALU
// result: one 16-bit word per address. The instruction memory is byte-addressed
// through the PC (see fetch) and is filled through the imem_* load port while
// reset is high.
//
// Observation outputs: pc, instr, the register write (rf_we, rf_waddr,
// rf_wdata) and the data-memory write (dm_we, dm_addr, dm_wdata) of the
// current cycle, plus branch_taken. They let a testbench trace execution.
//
// Interface: clk, reset (asynchronous, active high: PC := 0, R2..R15 := 0).
// An assertion flags an instruction-memory write while reset is low.
module cpu
  import cpu_pkg::*;
(
  input  logic            clk,
  input  logic            reset,
  input  logic            imem_we,
  input  logic [ALEN-1:0] imem_addr,
  input  logic [XLEN-1:0] imem_data,
  output logic [ALEN-1:0] pc,
  output logic [XLEN-1:0] instr,
  output logic            rf_we,
  output logic [3:0]      rf_waddr,
  output logic [XLEN-1:0] rf_wdata,
  output logic            dm_we,
  output logic [ALEN-1:0] dm_addr,
  output logic [XLEN-1:0] dm_wdata,
  output logic            branch_taken
);
  instr_t          ins;
  ctrl_t           ctrl;
  logic [XLEN-1:0] rs_val, rt_val, offset_ext, alu_b, alu_y, mem_rdata, wb;
  logic            zero;

  fetch #(.PC_W(ALEN)) u_fetch (
    .clk         (clk),
    .reset       (reset),
    .branch_taken(branch_taken),
    .jump        (ctrl.jump),
    .instr       (instr),
    .pc          (pc),
    .load_we     (imem_we),
    .load_addr   (imem_addr),
    .load_data   (imem_data)
  );

  assign ins = instr_t'(instr);

  control u_ctrl (
    .op  (ins.op),
    .ctrl(ctrl)
  );

  // RegDst: 0 selects Rt (LW), 1 selects Rd (R-type).
  mux #(.N(2), .WIDTH(4)) u_regdst (
    .d  ({ins.rd, ins.rt}),
    .sel(ctrl.reg_dst),
    .y  (rf_waddr)
  );

  regfile #(.NREGS(16), .WIDTH(XLEN), .NCONST(2)) u_rf (
    .clk       (clk),
    .clr       (reset),
    .write     (rf_we),
    .read_reg1 (ins.rs),
    .read_reg2 (ins.rt),
    .write_reg (rf_waddr),
    .write_data(rf_wdata),
    .read_data1(rs_val),
    .read_data2(rt_val)
  );

  assign offset_ext = {{(XLEN-4){ins.rd[3]}}, ins.rd};

  // ALUSrc: 0 selects Rt, 1 selects the sign-extended offset.
  mux #(.N(2), .WIDTH(XLEN)) u_alusrc (
    .d  ({offset_ext, rt_val}),
    .sel(ctrl.alu_src),
    .y  (alu_b)
  );

  alu #(.WIDTH(XLEN)) u_alu (
    .a     (rs_val),
    .b     (alu_b),
    .alu_op(ctrl.alu_op),
    .result(alu_y),
    .zero  (zero)
  );

  assign branch_taken = ctrl.branch & zero;

  assign dm_we    = ctrl.mem_write & ~reset;
  assign dm_addr  = alu_y[ALEN-1:0];
  assign dm_wdata = rt_val;

  ram #(.ADDR_W(ALEN), .DATA_W(XLEN)) u_dmem (
    .clk (clk),
    .we_n(~dm_we),
    .oe_n(1'b0),
    .addr(dm_addr),
    .din (dm_wdata),
    .dout(mem_rdata)
  );

  // MemToReg: 0 selects the ALU result, 1 the data-memory word (LW).
  mux #(.N(2), .WIDTH(XLEN)) u_wb (
    .d  ({mem_rdata, alu_y}),
    .sel(ctrl.mem_to_reg),
    .y  (wb)
  );

  assign rf_we    = ctrl.reg_write & ~reset;
  assign rf_wdata = wb;

  // Programs are loaded only while the CPU is held in reset.
  property p_load_in_reset;
    @(posedge clk) imem_we |-> reset;
  endproperty
  a_load_in_reset: assert property (p_load_in_reset)
    else $error("instruction memory written while the CPU runs");
endmodule
