// mux: N-input multiplexer of WIDTH-bit words.
//
// Output y is input word d[sel]. A select value of N or more (possible only when
// N is not a power of two) gives 0. It is used for the register-file read
// ports, for the write-register choice (RegDst), for the ALU's second operand
// (ALUSrc) and for the write-back value.
//
// Interface: d[N][WIDTH], sel, y[WIDTH]. Purely combinational.
module mux #(
  parameter int unsigned N     = 4,
  parameter int unsigned WIDTH = 1,
  localparam int unsigned SW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][WIDTH-1:0] d,
  input  logic [SW-1:0]           sel,
  output logic [WIDTH-1:0]        y
);
  always_comb begin
    y = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (sel == SW'(i)) y = d[i];
    end
  end
endmodule
