// nbit_register: WIDTH-bit register of D flip-flops with shared clock and clear.
//
// All bits share one clock and one clear, as in the lecture's register block
// (D15..0 in, Q15..0 out, CLK, CLR). clr is asynchronous and active high: it
// empties the register at once. At a rising clk edge with en=1 the register
// loads d. The lecture's register-file circuit gates the clock of each register
// with the write select. This design uses a load enable instead. It behaves the
// same at the clock edge and keeps a single clock net.
//
// Interface: clk, clr, en, d[WIDTH], q[WIDTH]. Timing: one rising edge from d to q.
module nbit_register #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             clr,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or posedge clr) begin
    if (clr)     q <= '0;
    else if (en) q <= d;
  end
endmodule
