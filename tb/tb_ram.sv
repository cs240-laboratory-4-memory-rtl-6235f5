// tb_ram: 256 x 16 RAM. Writes every word, reads them back, then mixes random
// writes and reads against a reference array. Checks /WE (no write when high)
// and /OE (output 0 when high).
module tb_ram;
  localparam int AW = 8, DW = 16;
  logic clk = 0, we_n, oe_n;
  logic [AW-1:0] addr;
  logic [DW-1:0] din, dout;
  logic [DW-1:0] model [2**AW];
  int checks = 0, failures = 0, cycles = 0;

  ram #(.ADDR_W(AW), .DATA_W(DW)) dut (
    .clk(clk), .we_n(we_n), .oe_n(oe_n), .addr(addr), .din(din), .dout(dout)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we_n = 1; oe_n = 0; addr = 0; din = 0;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      we_n = 0; addr = AW'(a); din = DW'($urandom); model[a] = din;
    end
    @(negedge clk); we_n = 1;
    for (int a = 0; a < 2**AW; a++) begin
      addr = AW'(a); #1;
      checks++;
      if (dout !== model[a]) begin failures++; $display("FAIL read %0d = %h expected %h", a, dout, model[a]); end
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we_n = 1'($urandom); oe_n = (i % 5 == 4); addr = AW'($urandom); din = DW'($urandom);
      #1;
      checks++;
      if (dout !== (oe_n ? '0 : model[addr])) begin failures++; $display("FAIL read before edge"); end
      @(posedge clk); #1;
      if (!we_n) model[addr] = din;
      checks++;
      if (dout !== (oe_n ? '0 : model[addr])) begin failures++; $display("FAIL read after edge addr %0d", addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
