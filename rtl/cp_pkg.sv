// cp_pkg: types and constants shared by the controller, the data transfer
// unit and the per-PE interface modules of the SIMD communications processor.
//
// The instruction word is 32 bits. Scalar instructions use a MIPS-like R/I
// layout: opcode[31:26] rs[25:21] rt[20:16] rd[15:11] funct[5:0] imm[15:0].
// The MOV opcode (010010) and its fields bank_index[25:22], count[21:16],
// initial_address[15:0] follow the published MOV format. All other opcode and
// funct values below are this design's own choice, as are the load
// instruction layout (opcode 0101mm, mm = algorithm width) and the rule that
// any opcode with bit 31 set is a PE instruction.
package cp_pkg;

  localparam int XLEN      = 32;   // controller word
  localparam int ILEN      = 32;   // instruction word
  localparam int DW        = 128;  // one data transfer word
  localparam int NBANK     = 8;    // local memory banks per PE
  localparam int LANES     = 64;   // SIMD lanes per PE
  localparam int LANE_W    = 16;   // lane word
  localparam int RF_ENT    = 16;   // PE register file entries

  // Opcodes
  localparam logic [5:0] OP_RTYPE = 6'b000000;
  localparam logic [5:0] OP_J     = 6'b000010;
  localparam logic [5:0] OP_JLINK = 6'b000011;
  localparam logic [5:0] OP_BEQ   = 6'b000100;
  localparam logic [5:0] OP_BNE   = 6'b000101;
  localparam logic [5:0] OP_BLT   = 6'b000110;
  localparam logic [5:0] OP_BGE   = 6'b000111;
  localparam logic [5:0] OP_ADDI  = 6'b001000;
  localparam logic [5:0] OP_SLTI  = 6'b001010;
  localparam logic [5:0] OP_SLTIU = 6'b001011;
  localparam logic [5:0] OP_ANDI  = 6'b001100;
  localparam logic [5:0] OP_ORI   = 6'b001101;
  localparam logic [5:0] OP_XORI  = 6'b001110;
  localparam logic [5:0] OP_LUI   = 6'b001111;
  localparam logic [5:0] OP_MOV   = 6'b010010;
  localparam logic [3:0] OP_LOAD_HI = 4'b0101;   // 0101mm, mm = width code
  localparam logic [5:0] OP_SLLI  = 6'b011000;
  localparam logic [5:0] OP_SRLI  = 6'b011010;
  localparam logic [5:0] OP_SRAI  = 6'b011011;

  // R-type funct
  localparam logic [5:0] FN_SLLV = 6'b000100;
  localparam logic [5:0] FN_SRLV = 6'b000110;
  localparam logic [5:0] FN_SRAV = 6'b000111;
  localparam logic [5:0] FN_ADD  = 6'b100000;
  localparam logic [5:0] FN_SUB  = 6'b100010;
  localparam logic [5:0] FN_AND  = 6'b100100;
  localparam logic [5:0] FN_OR   = 6'b100101;
  localparam logic [5:0] FN_XOR  = 6'b100110;
  localparam logic [5:0] FN_NOR  = 6'b100111;
  localparam logic [5:0] FN_SLT  = 6'b101010;
  localparam logic [5:0] FN_SLTU = 6'b101011;

  localparam logic [4:0] REG_RA = 5'd31;   // return address register

  // ALU operation (control S12)
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI
  } alu_op_e;

  // Compare operation (control S11)
  typedef enum logic [2:0] {
    CMP_EQ, CMP_NE, CMP_LT, CMP_LTU, CMP_GE, CMP_GEU
  } cmp_op_e;

  // Write-back source in the Execute stage
  typedef enum logic [1:0] { WB_ALU, WB_CMP, WB_LINK } wb_sel_e;

  // Algorithm width: how many banks one load reads
  typedef enum logic [1:0] { W_1 = 2'b00, W_2 = 2'b01, W_4 = 2'b10, W_8 = 2'b11 } width_e;

  // Decoded controls of one instruction in the Decode stage
  typedef struct packed {
    logic        regwrite;   // S14: instruction writes a register in Execute
    logic [4:0]  dst;        // destination register
    wb_sel_e     wb_sel;     // which result is written back
    alu_op_e     alu_op;     // S12
    cmp_op_e     cmp_op;     // S11
    logic        b_imm;      // second operand is the extended immediate
    logic        imm_zext;   // immediate is zero-extended (logic ops)
    logic        br_nz;      // S15: branch when ALU result is non-zero
    logic        br_cmp;     // S9 : branch when compare result bit 0 is set
    logic        jump;       // jumpD
    logic        s1;         // S1: 1 = unshifted immediate, 0 = immediate*4
    logic        s2;         // S2: 1 = target from register rs (JLINK)
    logic        s3;         // S3: 1 = route target to pcjD, 0 = pcbD
    logic        mov;        // start the data transfer unit
    logic        pe_pass;    // PE or load instruction, pass to interface
  } ctrl_t;

  function automatic logic is_load(input logic [ILEN-1:0] i);
    return i[31:28] == OP_LOAD_HI;
  endfunction

  function automatic logic is_pe(input logic [ILEN-1:0] i);
    return i[31];
  endfunction

endpackage
