// tb_clocked_sr_latch: checks that Q follows S/R only while CK is 1.
// The reference model below keeps its own bit and updates it only while CK is
// high, as the clocked latch's description says.
module tb_clocked_sr_latch;
  logic ck, s, r, q, q_n;
  logic model;
  int checks = 0, failures = 0;

  clocked_sr_latch dut (.ck(ck), .s(s), .r(r), .q(q), .q_n(q_n));

  task automatic step(input logic vck, vs, vr);
    logic eq, eqn;
    ck = vck; s = vs; r = vr;
    #5;
    if (vck && (vs ^ vr)) model = vs;
    eq  = ~(vck & vr) & ((vck & vs) | model);
    eqn = ~(vck & vs) & ((vck & vr) | ~model);
    checks++;
    if (q !== eq || q_n !== eqn) begin
      failures++;
      $display("FAIL CK=%0b S=%0b R=%0b -> Q=%0b Q'=%0b, expected %0b %0b", vck, vs, vr, q, q_n, eq, eqn);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ck = 1; s = 0; r = 1; #5; model = 0;
    // Directed: S pulses while CK is low must not set the latch.
    step(0, 1, 0);
    checks++; if (q !== 0) begin failures++; $display("FAIL set while CK low"); end
    step(1, 1, 0);
    checks++; if (q !== 1) begin failures++; $display("FAIL set while CK high"); end
    step(0, 0, 1);
    checks++; if (q !== 1) begin failures++; $display("FAIL reset while CK low"); end
    step(1, 0, 1);
    checks++; if (q !== 0) begin failures++; $display("FAIL reset while CK high"); end
    for (int i = 0; i < 200; i++) begin
      logic vck, vs, vr;
      vck = 1'($urandom); vs = 1'($urandom); vr = 1'($urandom);
      if (vs & vr) vr = 0; // keep away from the unpredictable case
      step(vck, vs, vr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
