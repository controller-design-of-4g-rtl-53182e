// ctrl_decoder: instruction decoder of the controller (Decode stage).
//
// Decodes scalar and data transfer (MOV) instructions into the control
// signals of the datapath, the PC logic and the data transfer unit. PE
// instructions (opcode bit 31 set) and the four load instructions (opcode
// 0101mm) are not executed here: the decoder only marks them (pe_pass) so the
// controller hands them to the interface modules. Any other encoding is a
// no-op. Combinational; the output is a cp_pkg::ctrl_t.
//
// The MOV opcode and fields follow the published format; the scalar
// encodings are this design's MIPS-like choice (see cp_pkg). Control names follow the published figures:
// S1/S2/S3 steer the address generation unit, S9 and S15 select the two
// kinds of branch, S11 and S12 choose the compare and ALU operations and S14
// marks a register write. Branch offsets are in words (S1=0); J carries a
// byte offset (S1=1); JLINK jumps to the address in rs (S2=1) and writes the
// return address pcD+4 into r31.
module ctrl_decoder
  import cp_pkg::*;
(
  input  logic [ILEN-1:0] instr,
  output ctrl_t           ctrl
);
  logic [5:0] opc, fn;
  logic [4:0] rt, rd;
  assign opc = instr[31:26];
  assign fn  = instr[5:0];
  assign rt  = instr[20:16];
  assign rd  = instr[15:11];

  always_comb begin
    ctrl          = '0;
    ctrl.wb_sel   = WB_ALU;
    ctrl.alu_op   = ALU_ADD;
    ctrl.cmp_op   = CMP_EQ;
    if (is_pe(instr) || is_load(instr)) begin
      ctrl.pe_pass = 1'b1;
    end else begin
      unique case (opc)
        OP_RTYPE: begin
          ctrl.dst      = rd;
          ctrl.regwrite = 1'b1;
          unique case (fn)
            FN_ADD : ctrl.alu_op = ALU_ADD;
            FN_SUB : ctrl.alu_op = ALU_SUB;
            FN_AND : ctrl.alu_op = ALU_AND;
            FN_OR  : ctrl.alu_op = ALU_OR;
            FN_XOR : ctrl.alu_op = ALU_XOR;
            FN_NOR : ctrl.alu_op = ALU_NOR;
            FN_SLLV: ctrl.alu_op = ALU_SLL;
            FN_SRLV: ctrl.alu_op = ALU_SRL;
            FN_SRAV: ctrl.alu_op = ALU_SRA;
            FN_SLT : begin ctrl.wb_sel = WB_CMP; ctrl.cmp_op = CMP_LT;  end
            FN_SLTU: begin ctrl.wb_sel = WB_CMP; ctrl.cmp_op = CMP_LTU; end
            default: ctrl.regwrite = 1'b0;   // no-op (includes all-zero word)
          endcase
        end
        OP_ADDI, OP_ANDI, OP_ORI, OP_XORI, OP_LUI, OP_SLTI, OP_SLTIU,
        OP_SLLI, OP_SRLI, OP_SRAI: begin
          ctrl.dst      = rt;
          ctrl.regwrite = 1'b1;
          ctrl.b_imm    = 1'b1;
          unique case (opc)
            OP_ADDI : ctrl.alu_op = ALU_ADD;
            OP_ANDI : begin ctrl.alu_op = ALU_AND; ctrl.imm_zext = 1'b1; end
            OP_ORI  : begin ctrl.alu_op = ALU_OR;  ctrl.imm_zext = 1'b1; end
            OP_XORI : begin ctrl.alu_op = ALU_XOR; ctrl.imm_zext = 1'b1; end
            OP_LUI  : begin ctrl.alu_op = ALU_LUI; ctrl.imm_zext = 1'b1; end
            OP_SLLI : ctrl.alu_op = ALU_SLL;
            OP_SRLI : ctrl.alu_op = ALU_SRL;
            OP_SRAI : ctrl.alu_op = ALU_SRA;
            OP_SLTI : begin ctrl.wb_sel = WB_CMP; ctrl.cmp_op = CMP_LT;  end
            OP_SLTIU: begin ctrl.wb_sel = WB_CMP; ctrl.cmp_op = CMP_LTU; end
            default : ;
          endcase
        end
        OP_BNE: begin                      // btE path: ALU subtract, not zero
          ctrl.alu_op = ALU_SUB;
          ctrl.br_nz  = 1'b1;
        end
        OP_BEQ, OP_BLT, OP_BGE: begin      // bothE path: compare unit
          ctrl.br_cmp = 1'b1;
          ctrl.cmp_op = (opc == OP_BEQ) ? CMP_EQ :
                        (opc == OP_BLT) ? CMP_LT : CMP_GE;
        end
        OP_J: begin
          ctrl.jump = 1'b1;
          ctrl.s1   = 1'b1;
          ctrl.s3   = 1'b1;
        end
        OP_JLINK: begin
          ctrl.jump     = 1'b1;
          ctrl.s2       = 1'b1;
          ctrl.s3       = 1'b1;
          ctrl.regwrite = 1'b1;
          ctrl.dst      = REG_RA;
          ctrl.wb_sel   = WB_LINK;
        end
        OP_MOV: ctrl.mov = 1'b1;
        default: ;                          // no-op
      endcase
    end
  end
endmodule
