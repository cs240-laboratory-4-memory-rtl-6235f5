// tb_latch_ram: 4 x 4 latch RAM. A clock pulse writes data_in to the addressed
// word; the word follows data_in while the pulse lasts and keeps it afterwards;
// the other words are untouched.
module tb_latch_ram;
  logic clock;
  logic [1:0] addr;
  logic [3:0] din, dout;
  logic [3:0] model [4];
  int checks = 0, failures = 0;

  latch_ram #(.WORDS(4), .WIDTH(4)) dut (.clock(clock), .addr(addr), .data_in(din), .data_out(dout));

  task automatic read_all(input string what);
    for (int a = 0; a < 4; a++) begin
      addr = 2'(a); #1;
      checks++;
      if (dout !== model[a]) begin failures++; $display("FAIL %s word %0d = %h expected %h", what, a, dout, model[a]); end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clock = 0; din = 0;
    for (int a = 0; a < 4; a++) begin
      addr = 2'(a); din = 4'(a + 3); #1; clock = 1; #1; clock = 0; #1;
      model[a] = 4'(a + 3);
    end
    read_all("initial");
    for (int i = 0; i < 100; i++) begin
      logic [3:0] v;
      addr = 2'($urandom); v = 4'($urandom); din = v; #1;
      clock = 1; #1;
      checks++;  // transparent while clock is high
      if (dout !== v) begin failures++; $display("FAIL transparent"); end
      clock = 0; #1;
      model[addr] = v;
      din = ~v; #1;  // data change after the pulse must not reach the word
      read_all("after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
