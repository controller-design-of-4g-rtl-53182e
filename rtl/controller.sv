// controller: three-stage scalar controller of the SIMD processor.
//
// Fetch: the PC register addresses the instruction memory; the next PC comes
// from pc_logic (pc+4, the branch target pcbE under bE, or the jump target
// pcjD under jumpD). Decode: ctrl_decoder decodes the instruction, the
// register file is read, hazard_unit forwards the Execute result into the
// operands when the Execute instruction writes a register this one reads,
// and addr_gen_unit computes the jump target (used at once) and the branch
// target (carried to Execute). A MOV starts the data transfer unit from
// Decode; a PE or load instruction is handed to the interface modules from
// Decode. Execute: the ALU and compare unit work, branch_ctrl forms bE, and
// the result is written back into the register file at the end of the stage.
//
// Control hazards: jumpD flushes the Fetch/Decode register; bE flushes both
// the Fetch/Decode and the Decode/Execute registers, so two instructions are
// lost per taken branch and one per jump. Stalls (this design's choice): a
// MOV in Decode waits while dt_busy is high, and a PE/load instruction waits
// while pe_out_ready is low; Fetch and Decode hold and a bubble enters
// Execute. A jump in Decode is ignored while a taken branch is in Execute.
// Reset is synchronous and active high; the PC restarts at 0.
module controller
  import cp_pkg::*;
#(
  parameter int IMEM_DEPTH = 1024,
  localparam int IAW = $clog2(IMEM_DEPTH)
) (
  input  logic            clk,
  input  logic            rst,
  // program load
  input  logic            imem_we,
  input  logic [IAW-1:0]  imem_waddr,
  input  logic [31:0]     imem_wdata,
  // data transfer unit initialisation
  output logic            dt_start,
  output logic [3:0]      dt_bank,
  output logic [5:0]      dt_count,
  output logic [15:0]     dt_addr,
  input  logic            dt_busy,
  // PE and load instructions to the interface modules
  output logic            pe_out_valid,
  output logic [ILEN-1:0] pe_out_instr,
  input  logic            pe_out_ready,
  // observation
  input  logic [4:0]      dbg_raddr,
  output logic [XLEN-1:0] dbg_rdata,
  output logic [XLEN-1:0] pc,
  output logic            stall,      // Decode held this cycle
  output logic            flush_b,    // taken branch in Execute
  output logic            flush_j,    // jump in Decode
  output logic            fwd         // a forward was used in Decode
);
  // ---------------- Fetch ----------------
  logic [XLEN-1:0] pcplus4F, instrF;
  logic            bE, jumpD, stallD;
  logic [XLEN-1:0] pcbE, pcjD;

  pc_logic #(.XLEN(XLEN)) u_pc (
    .clk, .rst, .en(~stallD), .be(bE), .pcbe(pcbE), .jumpd(jumpD), .pcjd(pcjD),
    .pc, .pcplus4(pcplus4F)
  );

  instr_mem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .addr(pc), .instr(instrF), .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  // Fetch/Decode registers
  logic            validD;
  logic [ILEN-1:0] instrD;
  logic [XLEN-1:0] pcD;
  always_ff @(posedge clk) begin
    if (rst || bE || jumpD) begin
      validD <= 1'b0;
      instrD <= '0;
      pcD    <= '0;
    end else if (!stallD) begin
      validD <= 1'b1;
      instrD <= instrF;
      pcD    <= pc;
    end
  end

  // ---------------- Decode ----------------
  ctrl_t ctrlD_raw, ctrlD;
  ctrl_decoder u_dec (.instr(instrD), .ctrl(ctrlD_raw));
  assign ctrlD = validD ? ctrlD_raw : '0;

  logic [4:0]      rsD, rtD;
  logic [XLEN-1:0] rd1D, rd2D, srcaD, srcbD, extimmD, pcbD, resultE;
  logic            haE, hbE, weE;
  ctrl_t           ctrlE;
  assign rsD = instrD[25:21];
  assign rtD = instrD[20:16];

  ctrl_regfile #(.XLEN(XLEN)) u_rf (
    .clk, .rst, .ra1(rsD), .ra2(rtD), .rd1(rd1D), .rd2(rd2D),
    .we(weE), .wa(ctrlE.dst), .wd(resultE), .dbg_ra(dbg_raddr), .dbg_rd(dbg_rdata)
  );

  hazard_unit u_hz (
    .rs(rsD), .rt(rtD), .regdste(ctrlE.dst), .s14(weE), .ha(haE), .hb(hbE)
  );
  assign srcaD = haE ? resultE : rd1D;
  assign srcbD = hbE ? resultE : rd2D;
  assign fwd   = validD && ((haE && rsD != 5'd0) || hbE);

  assign extimmD = ctrlD.imm_zext ? {16'h0, instrD[15:0]} : {{16{instrD[15]}}, instrD[15:0]};

  addr_gen_unit #(.XLEN(XLEN)) u_agu (
    .extimm(extimmD), .pcd(pcD), .srca(srcaD),
    .s1(ctrlD.s1), .s2(ctrlD.s2), .s3(ctrlD.s3), .pcj(pcjD), .pcb(pcbD)
  );

  logic mov_wait, pe_wait;
  assign mov_wait = ctrlD.mov && dt_busy;
  assign pe_wait  = ctrlD.pe_pass && !pe_out_ready;
  assign stallD   = !bE && (mov_wait || pe_wait);
  assign jumpD    = ctrlD.jump && !bE;

  assign dt_start     = ctrlD.mov && !dt_busy && !bE;
  assign dt_bank      = instrD[25:22];
  assign dt_count     = instrD[21:16];
  assign dt_addr      = instrD[15:0];
  assign pe_out_valid = ctrlD.pe_pass && pe_out_ready && !bE;
  assign pe_out_instr = instrD;

  assign stall   = stallD;
  assign flush_j = jumpD;

  // Decode/Execute registers
  logic [XLEN-1:0] srcaE, srcbE, immE, linkE;
  always_ff @(posedge clk) begin
    if (rst || bE || stallD) begin
      ctrlE <= '0;
      srcaE <= '0;
      srcbE <= '0;
      immE  <= '0;
      pcbE  <= '0;
      linkE <= '0;
    end else begin
      ctrlE <= ctrlD;
      srcaE <= srcaD;
      srcbE <= srcbD;
      immE  <= extimmD;
      pcbE  <= pcbD;
      linkE <= pcD + XLEN'(4);
    end
  end

  // ---------------- Execute ----------------
  logic [XLEN-1:0] opbE, aluyE, cresE;
  logic            zeroE, btE, bothE;
  assign opbE = ctrlE.b_imm ? immE : srcbE;

  ctrl_alu     u_alu (.a(srcaE), .b(opbE), .op(ctrlE.alu_op), .y(aluyE), .zero(zeroE));
  compare_unit u_cmp (.a(srcaE), .b(opbE), .op(ctrlE.cmp_op), .cresult(cresE));
  branch_ctrl  u_br  (.zero(zeroE), .s15(ctrlE.br_nz), .s9(ctrlE.br_cmp), .cres0(cresE[0]),
                      .bt(btE), .both(bothE), .be(bE));

  always_comb begin
    unique case (ctrlE.wb_sel)
      WB_CMP : resultE = cresE;
      WB_LINK: resultE = linkE;
      default: resultE = aluyE;
    endcase
  end
  assign weE     = ctrlE.regwrite;
  assign flush_b = bE;

  // The data transfer unit is never started while it is busy.
  a_no_start_busy: assert property (@(posedge clk) disable iff (rst) dt_start |-> !dt_busy);
endmodule
