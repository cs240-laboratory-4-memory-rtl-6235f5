// tb_lab4_top: end-to-end test of the whole top level at its default sizes.
//
// CPU part: a directed program (sum of 1..10 stored to memory by a loop, then
// SUB, SLT, AND, OR, LW/SW with negative offsets, a write to constant R0 and a
// branch not taken) and then random instruction streams. Each cycle is compared
// with an instruction-level reference model (one instruction per cycle).
// Side circuits: the SR latch, clocked SR latch, D latch, master-slave flip-flop,
// SR flip-flop, 16-bit register, 4 x 4 register file and 4 x 4 latch RAM are each
// driven through their own ports and checked.
// Every mechanism is counted: taken and not-taken branches, jumps, loads,
// stores, each ALU op, ignored writes to R0/R1, latch hold/transparency, edge
// capture, clear. A mechanism that never happened counts as a failure.
module tb_lab4_top;
  import cpu_pkg::*;
  logic clk = 0, reset, imem_we;
  logic [7:0]  imem_addr, pc, dm_addr;
  logic [15:0] imem_data, instr, rf_wdata, dm_wdata;
  logic [3:0]  rf_waddr;
  logic        rf_we, dm_we, branch_taken;

  int checks = 0, failures = 0, cycles = 0;
  int n_op[16];
  int n_taken = 0, n_not_taken = 0, n_const_write = 0;

  // Reference state
  logic [15:0] m_reg [16];
  logic [15:0] m_mem [256];
  bit          m_known [256];
  logic [7:0]  m_pc;
  logic [15:0] prog [128];

  // Side-circuit signals
  logic srl_s, srl_r, srl_q, srl_qn;
  logic csr_ck, csr_s, csr_r, csr_q, csr_qn;
  logic dl_c, dl_d, dl_q, dl_qn;
  logic dff_ck, dff_d, dff_q, dff_qn;
  logic srff_ck, srff_s, srff_r, srff_q, srff_qn;
  logic reg_clk, reg_clr, reg_en;
  logic [15:0] reg_d, reg_q;
  logic rf4_clk, rf4_clr, rf4_write;
  logic [1:0] rf4_rreg1, rf4_rreg2, rf4_wreg;
  logic [3:0] rf4_wdata, rf4_rdata1, rf4_rdata2;
  logic lram_clock;
  logic [1:0] lram_addr;
  logic [3:0] lram_din, lram_dout;
  int n_latch_hold = 0, n_latch_transparent = 0, n_edge_capture = 0, n_clear = 0;

  lab4_top dut (.*);

  task automatic expect_eq(input logic [15:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp); end
  endtask

  task automatic side_circuits();
    logic [3:0] rf4_model [4];
    logic [3:0] lram_model [4];
    // NOR SR latch: set, hold, both, reset.
    srl_s = 1; srl_r = 0; #1; expect_eq(16'(srl_q), 1, "SR latch set");
    srl_s = 0; #1; expect_eq(16'({srl_q, srl_qn}), 2'b10, "SR latch hold"); n_latch_hold++;
    srl_s = 1; srl_r = 1; #1; expect_eq(16'({srl_q, srl_qn}), 2'b00, "SR latch S=R=1");
    srl_s = 0; srl_r = 1; #1; expect_eq(16'({srl_q, srl_qn}), 2'b01, "SR latch reset");
    srl_r = 0; #1; expect_eq(16'({srl_q, srl_qn}), 2'b01, "SR latch hold 0");
    // Clocked SR latch: ignored while CK low, followed while high.
    csr_ck = 1; csr_s = 0; csr_r = 1; #1; csr_ck = 0; csr_r = 0; #1;
    csr_s = 1; #1; expect_eq(16'(csr_q), 0, "clocked SR latch, CK low"); n_latch_hold++;
    csr_ck = 1; #1; expect_eq(16'(csr_q), 1, "clocked SR latch, CK high"); n_latch_transparent++;
    csr_ck = 0; csr_s = 0; csr_r = 1; #1; expect_eq(16'(csr_q), 1, "clocked SR latch hold");
    // D latch.
    dl_c = 1; dl_d = 1; #1; expect_eq(16'(dl_q), 1, "D latch transparent"); n_latch_transparent++;
    dl_d = 0; #1; expect_eq(16'(dl_q), 0, "D latch follows D");
    dl_c = 0; dl_d = 1; #1; expect_eq(16'({dl_q, dl_qn}), 2'b01, "D latch holds"); n_latch_hold++;
    // Master-slave flip-flop: captures at the falling edge.
    dff_ck = 0; dff_d = 0; #1; dff_ck = 1; #1; dff_ck = 0; #1;
    dff_d = 1; #1; dff_ck = 1; #1; expect_eq(16'(dff_q), 0, "MS flip-flop before fall");
    dff_ck = 0; #1; expect_eq(16'(dff_q), 1, "MS flip-flop after fall"); n_edge_capture++;
    dff_d = 0; #1; expect_eq(16'(dff_q), 1, "MS flip-flop holds while CK low");
    // SR flip-flop: changes only on the rising edge.
    srff_ck = 0; srff_s = 0; srff_r = 1; #1; srff_ck = 1; #1; srff_ck = 0; srff_s = 1; srff_r = 0; #1;
    expect_eq(16'(srff_q), 0, "SR flip-flop before edge");
    srff_ck = 1; #1; expect_eq(16'({srff_q, srff_qn}), 2'b10, "SR flip-flop after edge"); n_edge_capture++;
    // 16-bit register: clear, load, hold.
    reg_clk = 0; reg_clr = 0; reg_en = 1; reg_d = 16'hBEEF; #1;
    reg_clr = 1; #1; expect_eq(reg_q, 0, "register clear"); n_clear++;
    reg_clr = 0; reg_clk = 1; #1; expect_eq(reg_q, 16'hBEEF, "register load"); n_edge_capture++;
    reg_clk = 0; reg_en = 0; reg_d = 16'h1234; #1; reg_clk = 1; #1; expect_eq(reg_q, 16'hBEEF, "register hold");
    // 4 x 4 register file: R0 = 0000, R1 = 0001 fixed, R2 and R3 writable.
    rf4_clk = 0; rf4_clr = 0; rf4_write = 0; rf4_wreg = 0; rf4_wdata = 0; #1;
    rf4_clr = 1; #1; rf4_clr = 0;
    rf4_model = '{4'h0, 4'h1, 4'h0, 4'h0};
    for (int i = 0; i < 40; i++) begin
      rf4_write = 1'($urandom); rf4_wreg = 2'($urandom); rf4_wdata = 4'($urandom);
      #1 rf4_clk = 1; #1 rf4_clk = 0;
      if (rf4_write && rf4_wreg >= 2) rf4_model[rf4_wreg] = rf4_wdata;
      rf4_rreg1 = 2'($urandom); rf4_rreg2 = 2'($urandom); #1;
      expect_eq(16'(rf4_rdata1), 16'(rf4_model[rf4_rreg1]), "4x4 register file port 1");
      expect_eq(16'(rf4_rdata2), 16'(rf4_model[rf4_rreg2]), "4x4 register file port 2");
    end
    // 4 x 4 latch RAM.
    lram_clock = 0;
    for (int i = 0; i < 40; i++) begin
      lram_addr = 2'(i % 4); lram_din = 4'($urandom); #1;
      lram_clock = 1; #1; lram_clock = 0; #1;
      lram_model[i % 4] = lram_din;
      lram_din = ~lram_din;
      if (i >= 4) begin
        lram_addr = 2'($urandom); #1;
        expect_eq(16'(lram_dout), 16'(lram_model[lram_addr]), "latch RAM read");
        n_latch_hold++;
      end
    end
  endtask

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] enc(logic [3:0] op, logic [3:0] rs, logic [3:0] rt, logic [3:0] rd);
    return {op, rs, rt, rd};
  endfunction

  task automatic load_and_reset();
    reset = 0; imem_we = 0;
    #1 reset = 1;
    for (int i = 0; i < 128; i++) begin
      @(negedge clk);
      imem_we = 1; imem_addr = 8'(2 * i); imem_data = prog[i];
    end
    @(negedge clk);
    imem_we = 0;
    for (int i = 0; i < 16; i++) m_reg[i] = (i == 1) ? 16'd1 : 16'd0;
    for (int i = 0; i < 256; i++) m_known[i] = 0;
    m_pc = 0;
    reset = 0;
    #1;
  endtask

  // One cycle: compare what the CPU does now with the model, then step both.
  task automatic step_and_check();
    logic [15:0] ins, a, b, y, off;
    logic [3:0]  op, rs, rt, rd;
    logic        e_rf_we, e_dm_we;
    logic [3:0]  e_waddr;
    logic [15:0] e_wdata;
    logic [7:0]  e_addr, next_pc;
    ins = prog[m_pc[7:1]];
    {op, rs, rt, rd} = ins;
    a = m_reg[rs]; b = m_reg[rt]; off = {{12{rd[3]}}, rd};
    e_rf_we = 0; e_dm_we = 0; e_waddr = 0; e_wdata = 0; e_addr = 0;
    next_pc = m_pc + 8'd2;
    n_op[op]++;
    case (op)
      4'b0000: begin  // LW
        e_addr = 8'(a + off);
        if (!m_known[e_addr]) begin
          m_mem[e_addr] = dut.u_cpu.u_dmem.mem[e_addr]; m_known[e_addr] = 1;
        end
        e_rf_we = 1; e_waddr = rt; e_wdata = m_mem[e_addr];
      end
      4'b0001: begin e_dm_we = 1; e_addr = 8'(a + off); end  // SW
      4'b0010: begin e_rf_we = 1; e_waddr = rd; e_wdata = a + b; end
      4'b0011: begin e_rf_we = 1; e_waddr = rd; e_wdata = a - b; end
      4'b0100: begin e_rf_we = 1; e_waddr = rd; e_wdata = a & b; end
      4'b0101: begin e_rf_we = 1; e_waddr = rd; e_wdata = a | b; end
      4'b0110: begin e_rf_we = 1; e_waddr = rd; e_wdata = ($signed(a) < $signed(b)) ? 16'd1 : 16'd0; end
      4'b0111: begin
        if (a == b) begin next_pc = 8'(m_pc + 8'd2 + 8'(off << 1)); n_taken++; end
        else n_not_taken++;
      end
      4'b1000: next_pc = 8'({ins[11:0], 1'b0});
      default: ;
    endcase
    checks++;
    if (pc !== m_pc || instr !== ins) begin
      failures++; $display("FAIL cycle %0d: pc=%0d instr=%h expected pc=%0d instr=%h", cycles, pc, instr, m_pc, ins);
    end
    checks++;
    if (rf_we !== e_rf_we || (e_rf_we && (rf_waddr !== e_waddr || rf_wdata !== e_wdata))) begin
      failures++; $display("FAIL pc=%0d %h reg write %0b R%0d=%h expected %0b R%0d=%h",
                           m_pc, ins, rf_we, rf_waddr, rf_wdata, e_rf_we, e_waddr, e_wdata);
    end
    checks++;
    if (dm_we !== e_dm_we || (e_dm_we && (dm_addr !== e_addr || dm_wdata !== b))) begin
      failures++; $display("FAIL pc=%0d %h mem write %0b [%0d]=%h expected %0b [%0d]=%h",
                           m_pc, ins, dm_we, dm_addr, dm_wdata, e_dm_we, e_addr, b);
    end
    // Model update
    if (e_rf_we && e_waddr < 2) n_const_write++;
    if (e_rf_we && e_waddr >= 2) m_reg[e_waddr] = e_wdata;
    if (e_dm_we) begin m_mem[e_addr] = b; m_known[e_addr] = 1; end
    m_pc = next_pc;
    @(negedge clk);
  endtask

  initial begin
    side_circuits();
    // Directed program: sum 1..10 into memory with a loop, then the other ops.
    for (int i = 0; i < 128; i++) prog[i] = enc(4'b1000, 4'h0, 4'h2, 4'h8); // JMP 40 (halt loop)
    prog[0]  = enc(4'b0010, 1, 1, 2);   // ADD R1,R1,R2      R2 = 2
    prog[1]  = enc(4'b0010, 2, 2, 3);   // ADD R2,R2,R3      R3 = 4
    prog[2]  = enc(4'b0010, 3, 3, 4);   // ADD R3,R3,R4      R4 = 8
    prog[3]  = enc(4'b0010, 4, 2, 5);   // ADD R4,R2,R5      R5 = 10
    prog[4]  = enc(4'b0010, 0, 0, 6);   // sum = 0
    prog[5]  = enc(4'b0010, 0, 0, 7);   // i = 0
    prog[6]  = enc(4'b0111, 7, 5, 4);   // BEQ R7,R5,+4  -> 22
    prog[7]  = enc(4'b0010, 7, 1, 7);   // i++
    prog[8]  = enc(4'b0010, 6, 7, 6);   // sum += i
    prog[9]  = enc(4'b0001, 7, 6, 0);   // SW R7,R6,0
    prog[10] = enc(4'b1000, 4'h0, 4'h0, 4'h6); // JMP 6 -> 12
    prog[11] = enc(4'b0011, 0, 5, 8);   // SUB  R8 = -10
    prog[12] = enc(4'b0110, 8, 0, 9);   // SLT  R9 = 1
    prog[13] = enc(4'b0100, 5, 4, 10);  // AND  R10 = 8
    prog[14] = enc(4'b0101, 5, 1, 11);  // OR   R11 = 11
    prog[15] = enc(4'b0000, 7, 12, 4'hF); // LW R7,R12,-1  R12 = mem[9]
    prog[16] = enc(4'b0001, 0, 12, 4'hE); // SW R0,R12,-2  mem[254]
    prog[17] = enc(4'b0000, 0, 13, 4'hE); // LW R0,R13,-2
    prog[18] = enc(4'b0010, 1, 0, 0);   // ADD into R0: ignored
    prog[19] = enc(4'b0111, 0, 1, 2);   // BEQ R0,R1: not taken
    load_and_reset();
    for (int c = 0; c < 120; c++) step_and_check();
    checks++;
    if (m_reg[6] !== 16'd55 || m_reg[12] !== 16'd45 || m_reg[13] !== 16'd45 || m_reg[8] !== 16'hFFF6
        || m_reg[9] !== 16'd1 || m_reg[10] !== 16'd8 || m_reg[11] !== 16'd11) begin
      failures++; $display("FAIL directed program results");
    end
    checks++;
    if (dut.u_cpu.u_dmem.mem[10] !== 16'd55 || dut.u_cpu.u_dmem.mem[254] !== 16'd45) begin
      failures++; $display("FAIL directed program memory");
    end

    // Random programs.
    for (int p = 0; p < 20; p++) begin
      for (int i = 0; i < 128; i++) begin
        logic [3:0] op;
        op = 4'($urandom % 10);
        if (op == 4'd9) op = 4'($urandom % 16);
        prog[i] = {op, 12'($urandom)};
        if (op == 4'b1000) prog[i][11:7] = 0;  // keep jumps inside the program
      end
      load_and_reset();
      for (int c = 0; c < 400; c++) step_and_check();
    end

    for (int o = 0; o <= 8; o++) begin
      checks++;
      if (n_op[o] == 0) begin failures++; $display("FAIL opcode %0d never ran", o); end
    end
    checks++;
    if (n_taken == 0 || n_not_taken == 0 || n_const_write == 0) begin
      failures++; $display("FAIL branch taken %0d, not taken %0d, R0/R1 writes %0d", n_taken, n_not_taken, n_const_write);
    end
    checks++;
    if (n_latch_hold == 0 || n_latch_transparent == 0 || n_edge_capture == 0 || n_clear == 0) begin
      failures++; $display("FAIL a storage-circuit mechanism never happened");
    end
    $display("latch holds=%0d transparent=%0d edge captures=%0d clears=%0d",
             n_latch_hold, n_latch_transparent, n_edge_capture, n_clear);
    $display("taken=%0d not_taken=%0d const_writes=%0d", n_taken, n_not_taken, n_const_write);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
