// asm_pkg: instruction builders used by the controller and system
// testbenches. Field layout: opcode[31:26] rs[25:21] rt[20:16] rd[15:11]
// funct[5:0] imm[15:0]; MOV is opcode 010010 with bank_index[25:22],
// count[21:16] and initial_address[15:0]; a load is 0101mm with bank base in
// [24:22] and register-file entry in [19:16].
package asm_pkg;
  import cp_pkg::*;

  function automatic logic [31:0] r_op(logic [5:0] fn, int rd, int rs, int rt);
    return {OP_RTYPE, 5'(rs), 5'(rt), 5'(rd), 5'd0, fn};
  endfunction
  function automatic logic [31:0] i_op(logic [5:0] op, int rt, int rs, int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  // branch: offset in words from the branch itself
  function automatic logic [31:0] br(logic [5:0] op, int rs, int rt, int woff);
    return {op, 5'(rs), 5'(rt), 16'(woff)};
  endfunction
  // J: byte offset from the jump itself
  function automatic logic [31:0] jmp(int boff);
    return {OP_J, 10'd0, 16'(boff)};
  endfunction
  function automatic logic [31:0] jlink(int rs);
    return {OP_JLINK, 5'(rs), 21'd0};
  endfunction
  function automatic logic [31:0] mov(int bank, int count, int addr);
    return {OP_MOV, 4'(bank), 6'(count), 16'(addr)};
  endfunction
  function automatic logic [31:0] load(int width, int bank, int entry);
    return {OP_LOAD_HI, 2'(width), 1'b0, 3'(bank), 2'b00, 4'(entry), 16'h0};
  endfunction
  function automatic logic [31:0] pe(int code);
    return 32'h8000_0000 | 32'(code);
  endfunction
endpackage
