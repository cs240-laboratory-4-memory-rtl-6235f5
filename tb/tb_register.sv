// tb_register: 16-bit register: load on rising edge when enabled, hold when not,
// asynchronous clear.
module tb_register;
  localparam int W = 16;
  logic clk = 0, clr, en;
  logic [W-1:0] d, q, model;
  int checks = 0, failures = 0, cycles = 0;

  nbit_register #(.WIDTH(W)) dut (.clk(clk), .clr(clr), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 0; en = 0; d = '1;
    #1 clr = 1;
    #2;
    checks++; if (q !== '0) begin failures++; $display("FAIL clear"); end
    clr = 0; model = '0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      en = 1'($urandom); d = W'($urandom);
      if (i % 37 == 36) begin
        clr = 1; #1; model = '0;
        checks++; if (q !== '0) begin failures++; $display("FAIL async clear"); end
        clr = 0;
      end
      @(posedge clk); #1;
      if (en) model = d;
      checks++;
      if (q !== model) begin failures++; $display("FAIL q=%h expected %h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
