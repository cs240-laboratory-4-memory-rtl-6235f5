// lab4_top: the lab's circuits side by side.
//
// The main design is the single-cycle 16-bit CPU (cpu), with its 16 x 16
// register file, ALU, 256 x 16 data memory and instruction memory. Next to it
// stand the lab's stand-alone storage circuits, each with its own ports:
//   - NOR SR latch, clocked SR latch, D latch (level-sensitive)
//   - master-slave D flip-flop (falling edge) and SR flip-flop (rising edge)
//   - a 16-bit register with clock and clear
//   - the 4-register x 4-bit register file of the lab circuit (R0 = 0000,
//     R1 = 0001 constant, R2 and R3 writable)
//   - the 4-word x 4-bit RAM built from D latches
// None of them share signals with the CPU or with each other.
//
// Port groups are prefixed by the circuit they belong to.
module lab4_top
  import cpu_pkg::*;
(
  // CPU
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
  output logic            branch_taken,
  // NOR SR latch
  input  logic            srl_s,
  input  logic            srl_r,
  output logic            srl_q,
  output logic            srl_qn,
  // clocked SR latch
  input  logic            csr_ck,
  input  logic            csr_s,
  input  logic            csr_r,
  output logic            csr_q,
  output logic            csr_qn,
  // D latch
  input  logic            dl_c,
  input  logic            dl_d,
  output logic            dl_q,
  output logic            dl_qn,
  // master-slave D flip-flop
  input  logic            dff_ck,
  input  logic            dff_d,
  output logic            dff_q,
  output logic            dff_qn,
  // edge-triggered SR flip-flop
  input  logic            srff_ck,
  input  logic            srff_s,
  input  logic            srff_r,
  output logic            srff_q,
  output logic            srff_qn,
  // 16-bit register
  input  logic            reg_clk,
  input  logic            reg_clr,
  input  logic            reg_en,
  input  logic [15:0]     reg_d,
  output logic [15:0]     reg_q,
  // 4 x 4 register file
  input  logic            rf4_clk,
  input  logic            rf4_clr,
  input  logic            rf4_write,
  input  logic [1:0]      rf4_rreg1,
  input  logic [1:0]      rf4_rreg2,
  input  logic [1:0]      rf4_wreg,
  input  logic [3:0]      rf4_wdata,
  output logic [3:0]      rf4_rdata1,
  output logic [3:0]      rf4_rdata2,
  // 4 x 4 latch RAM
  input  logic            lram_clock,
  input  logic [1:0]      lram_addr,
  input  logic [3:0]      lram_din,
  output logic [3:0]      lram_dout
);
  cpu u_cpu (
    .clk         (clk),
    .reset       (reset),
    .imem_we     (imem_we),
    .imem_addr   (imem_addr),
    .imem_data   (imem_data),
    .pc          (pc),
    .instr       (instr),
    .rf_we       (rf_we),
    .rf_waddr    (rf_waddr),
    .rf_wdata    (rf_wdata),
    .dm_we       (dm_we),
    .dm_addr     (dm_addr),
    .dm_wdata    (dm_wdata),
    .branch_taken(branch_taken)
  );

  sr_latch u_srl (.s(srl_s), .r(srl_r), .q(srl_q), .q_n(srl_qn));

  clocked_sr_latch u_csr (.ck(csr_ck), .s(csr_s), .r(csr_r), .q(csr_q), .q_n(csr_qn));

  d_latch u_dl (.c(dl_c), .d(dl_d), .q(dl_q), .q_n(dl_qn));

  dff_ms u_dff (.ck(dff_ck), .d(dff_d), .q(dff_q), .q_n(dff_qn));

  sr_flipflop u_srff (.ck(srff_ck), .s(srff_s), .r(srff_r), .q(srff_q), .q_n(srff_qn));

  nbit_register #(.WIDTH(16)) u_reg (
    .clk(reg_clk), .clr(reg_clr), .en(reg_en), .d(reg_d), .q(reg_q)
  );

  regfile #(.NREGS(4), .WIDTH(4), .NCONST(2)) u_rf4 (
    .clk       (rf4_clk),
    .clr       (rf4_clr),
    .write     (rf4_write),
    .read_reg1 (rf4_rreg1),
    .read_reg2 (rf4_rreg2),
    .write_reg (rf4_wreg),
    .write_data(rf4_wdata),
    .read_data1(rf4_rdata1),
    .read_data2(rf4_rdata2)
  );

  latch_ram #(.WORDS(4), .WIDTH(4)) u_lram (
    .clock   (lram_clock),
    .addr    (lram_addr),
    .data_in (lram_din),
    .data_out(lram_dout)
  );
endmodule
