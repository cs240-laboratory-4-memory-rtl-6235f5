// tb_alu: each ALU operation against the arithmetic worked out here, on corner
// and random operands; Zero checked every time.
module tb_alu;
  import cpu_pkg::*;
  logic [15:0] a, b, y;
  aluop_e op;
  logic zero;
  int checks = 0, failures = 0;

  alu #(.WIDTH(16)) dut (.a(a), .b(b), .alu_op(op), .result(y), .zero(zero));

  function automatic logic [15:0] ref_alu(aluop_e o, logic [15:0] x, logic [15:0] z);
    int sx, sz;
    sx = int'($signed(x)); sz = int'($signed(z));
    case (o)
      ALU_ADD: return 16'((int'(x) + int'(z)) % 65536);
      ALU_SUB: return 16'((int'(x) - int'(z) + 65536) % 65536);
      ALU_AND: return x & z;
      ALU_OR:  return x | z;
      ALU_SLT: return (sx < sz) ? 16'd1 : 16'd0;
      default: return 16'd0;
    endcase
  endfunction

  task automatic try(input aluop_e o, input logic [15:0] x, z);
    logic [15:0] e;
    op = o; a = x; b = z; #1;
    e = ref_alu(o, x, z);
    checks++;
    if (y !== e || zero !== (e == 0)) begin
      failures++; $display("FAIL %s %h %h -> %h z=%0b expected %h", o.name(), x, z, y, zero, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    aluop_e ops[5] = '{ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_SLT};
    try(ALU_ADD, 16'hFFFF, 16'h0001);
    try(ALU_SUB, 16'h1234, 16'h1234);
    try(ALU_SUB, 16'h0000, 16'h0001);
    try(ALU_SLT, 16'h8000, 16'h7FFF);
    try(ALU_SLT, 16'h7FFF, 16'h8000);
    try(ALU_SLT, 16'hFFFF, 16'hFFFF);
    try(ALU_AND, 16'hF0F0, 16'h0FF0);
    try(ALU_OR,  16'hF000, 16'h000F);
    for (int i = 0; i < 1000; i++) begin
      try(ops[i % 5], 16'($urandom), (i % 7 == 0) ? 16'($urandom % 4) : 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
