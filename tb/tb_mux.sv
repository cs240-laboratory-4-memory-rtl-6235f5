// tb_mux: the 4x1 multiplexer of the register-file circuit and a 2-input,
// 16-bit one, driven with random words.
module tb_mux;
  logic [3:0][0:0]  d4;  logic [1:0] s4; logic [0:0]  y4;
  logic [1:0][15:0] d2;  logic       s2; logic [15:0] y2;
  int checks = 0, failures = 0;

  mux #(.N(4), .WIDTH(1))  dut  (.d(d4), .sel(s4), .y(y4));
  mux #(.N(2), .WIDTH(16)) dut2 (.d(d2), .sel(s2), .y(y2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      d4 = 4'($urandom); s4 = 2'($urandom);
      d2 = 32'($urandom); s2 = 1'($urandom);
      #1;
      checks++;
      if (y4 !== ((d4 >> s4) & 1'b1)) begin failures++; $display("FAIL 4x1 sel=%0d", s4); end
      checks++;
      if (y2 !== (s2 ? d2[1] : d2[0])) begin failures++; $display("FAIL 2x16 sel=%0d", s2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
