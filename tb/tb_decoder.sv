// tb_decoder: exhaustive check of the 2x4 decoder and a 4x16 one.
module tb_decoder;
  logic en;
  logic [1:0] a2;  logic [3:0]  y2;
  logic [3:0] a4;  logic [15:0] y4;
  int checks = 0, failures = 0;

  decoder #(.N(2)) dut  (.en(en), .a(a2), .y(y2));
  decoder #(.N(4)) dut4 (.en(en), .a(a4), .y(y4));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int i = 0; i < 16; i++) begin
        en = 1'(e); a2 = 2'(i); a4 = 4'(i);
        #1;
        checks++;
        if (y2 !== (e ? 4'(1 << (i % 4)) : 4'b0)) begin
          failures++; $display("FAIL 2x4 en=%0d a=%0d y=%b", e, i % 4, y2);
        end
        checks++;
        if (y4 !== (e ? 16'(1 << i) : 16'b0)) begin
          failures++; $display("FAIL 4x16 en=%0d a=%0d y=%b", e, i, y4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
