// tb_d_latch: Q follows D while C=1 and holds while C=0.
module tb_d_latch;
  logic c, d, q, q_n;
  logic model;
  int checks = 0, failures = 0;

  d_latch dut (.c(c), .d(d), .q(q), .q_n(q_n));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    c = 1; d = 0; #5; model = 0;
    for (int i = 0; i < 300; i++) begin
      c = 1'($urandom); d = 1'($urandom);
      #5;
      if (c) model = d;
      checks++;
      if (q !== model || q_n !== ~model) begin
        failures++;
        $display("FAIL C=%0b D=%0b -> Q=%0b Q'=%0b, expected Q=%0b", c, d, q, q_n, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
