// latch_ram: small RAM built from D latches (default 4 words x 4 bits).
//
// This is the gate-level RAM layout of the lecture. Each bit is a D latch.
// A decoder turns the address into a one-hot word select. For each word, an
// AND of the clock input with that word's select drives the C input of all the
// word's latches, so the addressed word is transparent to data_in while clock
// is 1 and holds its value when clock returns to 0. The lecture's outputs are
// tri-state buffers enabled by the word select and joined on one data-out bus.
// Here that bus is an AND-OR of each word with its select, which gives the same
// value in a two-valued simulation.
//
// Latches are intended here; the latch warnings for this module stand.
//
// Interface: clock (write strobe, active high), addr, data_in, data_out.
// Timing: writes are level-sensitive; data_out is combinational in addr.
module latch_ram #(
  parameter int unsigned WORDS = 4,
  parameter int unsigned WIDTH = 4,
  localparam int unsigned AW   = $clog2(WORDS)
) (
  input  logic             clock,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out
);
  logic [2**AW-1:0]            sel;
  logic [WORDS-1:0][WIDTH-1:0] word_q;
  logic [WORDS-1:0][WIDTH-1:0] word_qn;

  decoder #(.N(AW)) u_dec (
    .en(1'b1),
    .a (addr),
    .y (sel)
  );

  for (genvar w = 0; w < WORDS; w++) begin : g_word
    logic gate;
    assign gate = clock & sel[w];
    for (genvar b = 0; b < WIDTH; b++) begin : g_bit
      d_latch u_bit (
        .c  (gate),
        .d  (data_in[b]),
        .q  (word_q[w][b]),
        .q_n(word_qn[w][b])
      );
    end
  end

  // Selected-word output bus (tri-state buffers in the lecture circuit).
  always_comb begin
    data_out = '0;
    for (int unsigned w = 0; w < WORDS; w++) begin
      data_out |= word_q[w] & {WIDTH{sel[w]}};
    end
  end
endmodule
