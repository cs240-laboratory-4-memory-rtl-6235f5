// tb_fetch: PC resets to 0 and steps by 2; a taken branch goes to
// PC + 2 + offset*2 (offset sign-extended from 4 bits); a jump goes to
// offset*2. The instruction memory is loaded with random words first and read
// back through the PC.
module tb_fetch;
  logic clk = 0, reset, br, jmp, lwe;
  logic [15:0] instr, ldata;
  logic [7:0] pc, laddr, exp_pc;
  logic [15:0] image [128];
  int checks = 0, failures = 0, cycles = 0;

  fetch #(.PC_W(8)) dut (
    .clk(clk), .reset(reset), .branch_taken(br), .jump(jmp), .instr(instr), .pc(pc),
    .load_we(lwe), .load_addr(laddr), .load_data(ldata)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 0; #1 reset = 1; br = 0; jmp = 0; lwe = 0; laddr = 0; ldata = 0;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      lwe = 1; laddr = 8'(2 * i); ldata = 16'($urandom); image[i] = ldata;
    end
    @(negedge clk); lwe = 0; #1;
    checks++; if (pc !== 0) begin failures++; $display("FAIL reset pc=%0d", pc); end
    reset = 0;
    exp_pc = 0;
    for (int i = 0; i < 1000; i++) begin
      checks++;
      if (pc !== exp_pc || instr !== image[exp_pc[7:1]]) begin
        failures++; $display("FAIL pc=%0d instr=%h expected pc=%0d instr=%h", pc, instr, exp_pc, image[exp_pc[7:1]]);
      end
      br = ($urandom % 4 == 0); jmp = ($urandom % 8 == 0);
      #1;
      if (jmp)     exp_pc = 8'({instr[11:0], 1'b0});
      else if (br) exp_pc = 8'(exp_pc + 8'd2 + 8'(signed'(instr[3:0])) * 8'd2);
      else         exp_pc = exp_pc + 8'd2;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
