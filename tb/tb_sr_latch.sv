// tb_sr_latch: walks the NOR SR latch through its truth table.
// Expected values come from the table: set -> Q=1,Q'=0; reset -> Q=0,Q'=1;
// S=R=0 remembers; S=R=1 gives Q=Q'=0.
module tb_sr_latch;
  logic s, r, q, q_n;
  int checks = 0, failures = 0;

  sr_latch dut (.s(s), .r(r), .q(q), .q_n(q_n));

  task automatic apply(input logic vs, vr, input logic eq, eqn, input string what);
    s = vs; r = vr;
    #5;
    checks++;
    if (q !== eq || q_n !== eqn) begin
      failures++;
      $display("FAIL %s: S=%0b R=%0b -> Q=%0b Q'=%0b, expected %0b %0b", what, vs, vr, q, q_n, eq, eqn);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply(1, 0, 1, 0, "set");
    apply(0, 0, 1, 0, "remember 1");
    apply(0, 1, 0, 1, "reset");
    apply(0, 0, 0, 1, "remember 0");
    apply(1, 0, 1, 0, "set again");
    apply(1, 1, 0, 0, "both");
    apply(0, 0, 1, 0, "release keeps last");
    apply(0, 1, 0, 1, "reset again");
    apply(1, 1, 0, 0, "both from 0");
    apply(0, 0, 0, 1, "release keeps 0");
    for (int i = 0; i < 40; i++) begin
      logic vs, vr;
      vs = 1'($urandom); vr = 1'($urandom);
      if (vs & ~vr) apply(vs, vr, 1, 0, "random set");
      else if (~vs & vr) apply(vs, vr, 0, 1, "random reset");
      else if (vs & vr) apply(vs, vr, 0, 0, "random both");
      else apply(vs, vr, q, q_n, "random remember");
      if (vs & vr) begin
        s = 0; r = 1; #5; // leave a defined state
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
