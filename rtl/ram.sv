// ram: word-organised random-access memory (2^ADDR_W words of DATA_W bits).
//
// The default size, 256 x 16, is the lecture's RAM part on an 8-bit address bus
// and a 16-bit data bus. The part has separate data-in and data-out pins and
// active-low write enable (/WE) and output enable (/OE). Reading is
// combinational: with oe_n=0, dout shows the word at addr; with oe_n=1, dout is
// 0 (this design's stand-in for the undriven bus). The lecture's part writes
// while /WE is low, without a clock. This design writes din into word addr at
// the rising clk edge while we_n=0, so that the memory is an ordinary
// synchronous-write array. The contents are not initialised.
//
// Interface: clk, we_n, oe_n, addr[ADDR_W], din[DATA_W], dout[DATA_W].
module ram #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              we_n,
  input  logic              oe_n,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (!we_n) mem[addr] <= din;
  end

  assign dout = oe_n ? '0 : mem[addr];
endmodule
