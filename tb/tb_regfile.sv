// tb_regfile: 16 x 16 register file with R0 = 0 and R1 = 1 constant.
// A reference array tracks the expected contents. Random writes (including
// attempts on R0 and R1) and random reads on both ports are compared each cycle.
// The same-cycle read of a register being written must return the old value.
module tb_regfile;
  localparam int N = 16, W = 16;
  logic clk = 0, clr, write;
  logic [3:0] rr1, rr2, wr;
  logic [W-1:0] wd, rd1, rd2;
  logic [W-1:0] model [N];
  int checks = 0, failures = 0, cycles = 0;

  regfile #(.NREGS(N), .WIDTH(W), .NCONST(2)) dut (
    .clk(clk), .clr(clr), .write(write), .read_reg1(rr1), .read_reg2(rr2),
    .write_reg(wr), .write_data(wd), .read_data1(rd1), .read_data2(rd2)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    checks++;
    if (rd1 !== model[rr1]) begin failures++; $display("FAIL t=%0t port1 R%0d=%h expected %h", $time, rr1, rd1, model[rr1]); end
    checks++;
    if (rd2 !== model[rr2]) begin failures++; $display("FAIL port2 R%0d=%h expected %h", rr2, rd2, model[rr2]); end
  endtask

  initial begin
    clr = 0; #1 clr = 1; write = 0; rr1 = 0; rr2 = 0; wr = 0; wd = 0;
    for (int i = 0; i < N; i++) model[i] = (i < 2) ? W'(i) : '0;
    #2 clr = 0;
    // Clear state: every register reads as its model value.
    for (int i = 0; i < N; i++) begin
      rr1 = 4'(i); rr2 = 4'(N - 1 - i); #1; check_reads();
    end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      write = 1'($urandom); wr = 4'($urandom); wd = W'($urandom);
      rr1 = 4'($urandom); rr2 = (i % 3 == 0) ? wr : 4'($urandom);
      #1; check_reads();  // before the edge: old values
      @(posedge clk); #1;
      if (write && wr >= 2) model[wr] = wd;
      check_reads();
    end
    // Clear empties R2..R15 and leaves the constants.
    write = 0;
    clr = 1; #1; clr = 0;
    for (int i = 2; i < N; i++) model[i] = '0;
    for (int i = 0; i < N; i++) begin
      rr1 = 4'(i); rr2 = 4'(i); #1; check_reads();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
