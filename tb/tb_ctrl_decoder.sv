// tb_ctrl_decoder: one instruction of every class is decoded and the fields
// that matter for it (register write, destination, ALU/compare operation,
// branch kind, S1/S2/S3, MOV start, PE pass) are compared with a table.
module tb_ctrl_decoder;
  import cp_pkg::*;
  logic [31:0] instr;
  ctrl_t c;
  int checks = 0, failures = 0;

  ctrl_decoder dut (.instr, .ctrl(c));

  function automatic logic [31:0] R(logic [5:0] fn, int rs, int rt, int rd);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] I(logic [5:0] op, int rs, int rt, logic [15:0] imm);
    return {op, 5'(rs), 5'(rt), imm};
  endfunction

  task automatic chk(string name, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s instr=%h", name, instr); end
  endtask

  initial begin
    #1_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr = R(FN_ADD, 1, 2, 3); #1;
    chk("add", c.regwrite && c.dst == 3 && c.alu_op == ALU_ADD && !c.b_imm && c.wb_sel == WB_ALU && !c.pe_pass);
    instr = R(FN_SUB, 1, 2, 4); #1;  chk("sub", c.regwrite && c.dst == 4 && c.alu_op == ALU_SUB);
    instr = R(FN_NOR, 1, 2, 4); #1;  chk("nor", c.alu_op == ALU_NOR);
    instr = R(FN_SRAV, 1, 2, 4); #1; chk("srav", c.alu_op == ALU_SRA);
    instr = R(FN_SLT, 1, 2, 5); #1;  chk("slt", c.regwrite && c.wb_sel == WB_CMP && c.cmp_op == CMP_LT);
    instr = R(FN_SLTU, 1, 2, 5); #1; chk("sltu", c.cmp_op == CMP_LTU && c.wb_sel == WB_CMP);
    instr = 32'h0; #1;               chk("nop", !c.regwrite && !c.jump && !c.br_nz && !c.br_cmp && !c.mov && !c.pe_pass);
    instr = I(OP_ADDI, 1, 7, 16'hFFFF); #1; chk("addi", c.regwrite && c.dst == 7 && c.b_imm && !c.imm_zext && c.alu_op == ALU_ADD);
    instr = I(OP_ORI, 1, 7, 16'hFFFF); #1;  chk("ori", c.b_imm && c.imm_zext && c.alu_op == ALU_OR);
    instr = I(OP_LUI, 0, 9, 16'h1234); #1;  chk("lui", c.regwrite && c.dst == 9 && c.alu_op == ALU_LUI);
    instr = I(OP_SLLI, 2, 9, 16'd3); #1;    chk("slli", c.alu_op == ALU_SLL && c.b_imm);
    instr = I(OP_SLTI, 2, 9, 16'd3); #1;    chk("slti", c.wb_sel == WB_CMP && c.cmp_op == CMP_LT && c.b_imm);
    instr = I(OP_BNE, 1, 2, 16'hFFFE); #1;
    chk("bne", c.br_nz && !c.br_cmp && c.alu_op == ALU_SUB && !c.regwrite && !c.s1 && !c.s3 && !c.jump);
    instr = I(OP_BEQ, 1, 2, 16'd4); #1;  chk("beq", c.br_cmp && !c.br_nz && c.cmp_op == CMP_EQ && !c.regwrite && !c.s3);
    instr = I(OP_BLT, 1, 2, 16'd4); #1;  chk("blt", c.br_cmp && c.cmp_op == CMP_LT);
    instr = I(OP_BGE, 1, 2, 16'd4); #1;  chk("bge", c.br_cmp && c.cmp_op == CMP_GE);
    instr = I(OP_J, 0, 0, 16'd8); #1;    chk("j", c.jump && c.s1 && !c.s2 && c.s3 && !c.regwrite);
    instr = I(OP_JLINK, 5, 0, 16'd0); #1;
    chk("jlink", c.jump && c.s2 && c.s3 && c.regwrite && c.dst == 31 && c.wb_sel == WB_LINK);
    instr = {OP_MOV, 4'd1, 6'd3, 16'd0}; #1; chk("mov", c.mov && !c.regwrite && !c.pe_pass);
    instr = 32'h5400_0000; #1;               chk("load", c.pe_pass && !c.regwrite && !c.mov);
    instr = 32'h8123_4567; #1;               chk("pe", c.pe_pass && !c.regwrite && !c.jump);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
