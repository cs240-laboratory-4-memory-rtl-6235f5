// tb_control: every opcode against the control table of the instruction set.
module tb_control;
  import cpu_pkg::*;
  logic [3:0] op;
  ctrl_t c;
  int checks = 0, failures = 0;

  control dut (.op(op), .ctrl(c));

  // Expected {reg_dst, alu_src, reg_write, mem_write, mem_to_reg, branch, jump}
  // and ALU op for each opcode, written out from the instruction table.
  function automatic logic [10:0] expect_of(int o);
    case (o)
      0: return {7'b0110100, 4'b0010};  // LW
      1: return {7'b0101000, 4'b0010};  // SW
      2: return {7'b1010000, 4'b0010};  // ADD
      3: return {7'b1010000, 4'b0011};  // SUB
      4: return {7'b1010000, 4'b0100};  // AND
      5: return {7'b1010000, 4'b0101};  // OR
      6: return {7'b1010000, 4'b0110};  // SLT
      7: return {7'b0000010, 4'b0011};  // BEQ
      8: return {7'b0000001, 4'b0010};  // JMP
      default: return {7'b0000000, 4'b0010};
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 16; o++) begin
      logic [10:0] got, e;
      op = 4'(o); #1;
      got = {c.reg_dst, c.alu_src, c.reg_write, c.mem_write, c.mem_to_reg, c.branch, c.jump, 4'(c.alu_op)};
      e = expect_of(o);
      // ALU op only matters where something uses the ALU result.
      if (o == 8 || o > 8) begin got[3:0] = 4'b0010; end
      checks++;
      if (got !== e) begin failures++; $display("FAIL op %b: %b expected %b", 4'(o), got, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
