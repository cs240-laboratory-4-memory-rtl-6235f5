// tb_sr_flipflop: Q changes only at rising edges, per the SR rules.
module tb_sr_flipflop;
  logic ck = 0, s, r, q, q_n;
  logic model;
  int checks = 0, failures = 0;
  int cycles = 0;

  sr_flipflop dut (.ck(ck), .s(s), .r(r), .q(q), .q_n(q_n));

  always #5 ck = ~ck;
  always @(posedge ck) cycles++;

  initial begin
    wait (cycles == 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = 0; r = 1;
    @(posedge ck); #1; model = 0;
    for (int i = 0; i < 200; i++) begin
      s = 1'($urandom); r = 1'($urandom);
      #2;  // inputs changed, no edge yet
      checks++;
      if (q !== model) begin failures++; $display("FAIL changed without an edge"); end
      @(posedge ck); #1;
      if (s & ~r) model = 1;
      else if (~s & r) model = 0;
      checks++;
      if (q !== model || q_n !== ~model) begin
        failures++;
        $display("FAIL S=%0b R=%0b: Q=%0b expected %0b", s, r, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
