// regfile: register file with two read ports and one write port.
//
// NREGS registers of WIDTH bits. Read register 1 and read register 2 each pick
// a register through an NREGS-input multiplexer, and the values appear at Read
// data 1 and Read data 2 with no clock (combinational read). A decoder turns the
// write register number into a one-hot select. That select, ANDed with Write,
// is the load enable of each register. The write happens at the rising clock
// edge. A read in the same cycle as a write to the same register returns the
// old value.
//
// The first NCONST registers are constants that hold their own number: R0 = 0
// and R1 = 1 in the CPU, as in the lecture's instruction set and in its 4x4
// register-file circuit (Register 0 = 0000, Register 1 = 0001). Writes to them
// are ignored. clr (asynchronous, active high) clears every writable register.
//
// Interface: clk, clr, write, read_reg1, read_reg2, write_reg, write_data,
// read_data1, read_data2.
module regfile #(
  parameter int unsigned NREGS  = 16,
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned NCONST = 2,
  localparam int unsigned AW    = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             write,
  input  logic [AW-1:0]    read_reg1,
  input  logic [AW-1:0]    read_reg2,
  input  logic [AW-1:0]    write_reg,
  input  logic [WIDTH-1:0] write_data,
  output logic [WIDTH-1:0] read_data1,
  output logic [WIDTH-1:0] read_data2
);
  logic [NREGS-1:0]            sel;
  logic [NREGS-1:0][WIDTH-1:0] regs;

  decoder #(.N(AW)) u_dec (
    .en(write),
    .a (write_reg),
    .y (sel)
  );

  for (genvar i = 0; i < NREGS; i++) begin : g_reg
    if (i < NCONST) begin : g_const
      assign regs[i] = WIDTH'(i);
    end else begin : g_rw
      nbit_register #(.WIDTH(WIDTH)) u_r (
        .clk(clk),
        .clr(clr),
        .en (sel[i]),
        .d  (write_data),
        .q  (regs[i])
      );
    end
  end

  mux #(.N(NREGS), .WIDTH(WIDTH)) u_rd1 (
    .d  (regs),
    .sel(read_reg1),
    .y  (read_data1)
  );

  mux #(.N(NREGS), .WIDTH(WIDTH)) u_rd2 (
    .d  (regs),
    .sel(read_reg2),
    .y  (read_data2)
  );
endmodule
