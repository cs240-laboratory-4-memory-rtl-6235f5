// tb_dff_ms: the master-slave flip-flop takes D at the falling edge of CK.
// D is changed at several points of each clock period; Q must change only
// right after a falling edge, to the value D had at that edge.
module tb_dff_ms;
  logic ck, d, q, q_n;
  logic model;
  int checks = 0, failures = 0;

  dff_ms dut (.ck(ck), .d(d), .q(q), .q_n(q_n));

  task automatic chk(input string what);
    checks++;
    if (q !== model || q_n !== ~model) begin
      failures++;
      $display("FAIL %s at %0t: Q=%0b expected %0b", what, $time, q, model);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Start: load 0 through one full clock period.
    ck = 1; d = 0; #5; ck = 0; #5; model = 0;
    chk("init");
    for (int i = 0; i < 100; i++) begin
      d = 1'($urandom); #2;       // CK low: master closed, slave shows old value
      chk("ck low");
      ck = 1; #2;                 // master transparent
      chk("after rise");
      d = 1'($urandom); #2;       // D changes while CK high
      chk("ck high");
      d = 1'($urandom); #2;
      model = d;
      ck = 0; #2;                 // falling edge: Q takes D
      chk("after fall");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
