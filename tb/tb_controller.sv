// tb_controller: runs a program on the controller alone, with the data
// transfer unit and the interface modules replaced by small models (busy for
// count+1 cycles after a start; a ready that drops at random). The program
// has a counted loop (BNE), compare branches taken and not taken, set-less-
// than, LUI/ORI, back-to-back dependences (forwarding), a JLINK call and
// return, a J, two MOVs in a row (the second must stall) and PE/load
// instructions. Checked: final registers, the MOV fields, the order of the
// instructions passed on, that squashed instructions have no effect, and the
// cycle of the first retirement of the final instruction against
// 2 (fill) + instructions + 2 per taken branch + 1 per jump + stall cycles.
module tb_controller;
  import cp_pkg::*;
  import asm_pkg::*;
  logic clk = 0, rst;
  logic imem_we;
  logic [9:0] imem_waddr;
  logic [31:0] imem_wdata, pe_out_instr, dbg_rdata, pc;
  logic dt_start, dt_busy, pe_out_valid, pe_out_ready, stall, flush_b, flush_j, fwd;
  logic [3:0] dt_bank;
  logic [5:0] dt_count;
  logic [15:0] dt_addr;
  logic [4:0] dbg_raddr;
  int checks = 0, failures = 0;

  controller dut (.clk, .rst, .imem_we, .imem_waddr, .imem_wdata, .dt_start, .dt_bank,
    .dt_count, .dt_addr, .dt_busy, .pe_out_valid, .pe_out_instr, .pe_out_ready,
    .dbg_raddr, .dbg_rdata, .pc, .stall, .flush_b, .flush_j, .fwd);
  always #5 clk = ~clk;

  task automatic chk(string s, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", s); end
  endtask

  logic [31:0] prog [$];
  initial begin
    prog = '{
      i_op(OP_ADDI, 1, 0, 10),        // 0  r1 = 10
      i_op(OP_ADDI, 2, 0, 0),         // 1  r2 = 0
      r_op(FN_ADD, 2, 2, 1),          // 2  loop: r2 += r1
      i_op(OP_ADDI, 1, 1, -1),        // 3  r1--
      br(OP_BNE, 1, 0, -2),           // 4  if r1 != 0 goto 2
      r_op(FN_SLT, 3, 0, 2),          // 5  r3 = (0 < r2)
      i_op(OP_LUI, 4, 0, 16'h1234),   // 6
      i_op(OP_ORI, 4, 4, 16'h5678),   // 7  r4 = 0x12345678
      mov(1, 3, 0),                   // 8
      mov(2, 2, 16),                  // 9  waits for the first transfer
      pe(1),                          // 10
      load(0, 1, 3),                  // 11
      i_op(OP_ADDI, 5, 0, 80),        // 12 r5 = 80 (word 20)
      jlink(5),                       // 13 call
      i_op(OP_ADDI, 6, 0, 7),         // 14 r6 = 7
      br(OP_BEQ, 6, 6, 3),            // 15 taken -> 18
      i_op(OP_ADDI, 7, 0, 1),         // 16 squashed
      pe(99),                         // 17 squashed, must not be passed on
      br(OP_BGE, 0, 6, 5),            // 18 0 >= 7 false
      jmp(20),                        // 19 -> word 24
      i_op(OP_ADDI, 8, 0, 99),        // 20 function
      i_op(OP_SLLI, 9, 8, 2),         // 21 r9 = 396
      jlink(31),                      // 22 return, r31 = 92
      i_op(OP_ADDI, 10, 0, 1),        // 23 squashed
      jmp(0)                          // 24 halt loop
    };
  end

  // data transfer unit model
  int busy_cnt = 0, n_start = 0;
  logic [25:0] starts [$];
  always @(posedge clk) begin
    if (rst) busy_cnt <= 0;
    else if (dt_start) begin
      busy_cnt <= int'(dt_count) + 1;
      starts.push_back({dt_bank, dt_count, dt_addr});
    end else if (busy_cnt > 0) busy_cnt <= busy_cnt - 1;
  end
  assign dt_busy = busy_cnt > 0;

  logic [31:0] passed [$];
  int n_stall = 0, n_bflush = 0, n_jflush = 0, n_fwd = 0, cyc = 0, retire_cyc = -1, retired = 0;
  always @(posedge clk) if (!rst) begin
    if (pe_out_valid) passed.push_back(pe_out_instr);
    if (stall) n_stall++;
    if (flush_b) n_bflush++;
    if (flush_j) n_jflush++;
    if (fwd) n_fwd++;
    if (dut.ctrlE != '0) begin
      retired++;
    end
    cyc++;
  end
  // first time the halt jump (word 24) is in Decode and acts
  always @(posedge clk) if (!rst && retire_cyc < 0 && flush_j && dut.pcD == 32'd96) retire_cyc = cyc;

  always @(negedge clk) pe_out_ready <= ($urandom_range(0, 2) != 0);

  initial begin
    #2_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expv [32];
    rst = 1; imem_we = 0; imem_waddr = 0; imem_wdata = 0; dbg_raddr = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 10'(i);
      imem_wdata = (i < prog.size()) ? prog[i] : 32'h0;
    end
    @(negedge clk); imem_we = 0; rst = 0;
    wait (retire_cyc >= 0);
    repeat (4) @(negedge clk);
    for (int r = 0; r < 32; r++) expv[r] = 0;
    expv[1] = 0; expv[2] = 55; expv[3] = 1; expv[4] = 32'h1234_5678; expv[5] = 80;
    expv[6] = 7; expv[8] = 99; expv[9] = 396; expv[31] = 92;
    for (int r = 0; r < 32; r++) begin
      dbg_raddr = 5'(r); #1;
      chk($sformatf("r%0d = %h exp %h", r, dbg_rdata, expv[r]), dbg_rdata === expv[r]);
    end
    chk("two MOV starts", starts.size() == 2);
    if (starts.size() == 2) begin
      chk("mov 1 fields", starts[0] == {4'd1, 6'd3, 16'd0});
      chk("mov 2 fields", starts[1] == {4'd2, 6'd2, 16'd16});
    end
    chk("passed instructions", passed.size() == 2);
    if (passed.size() == 2) chk("passed order", passed[0] == pe(1) && passed[1] == load(0, 1, 3));
    chk("stall happened", n_stall > 0);
    chk("forwarding happened", n_fwd > 0);
    chk("taken branches = 10", n_bflush == 10);
    // halt jump in Decode at cycle: 2 fill + 48 earlier instructions + 1 (its own
    // Fetch->Decode) ... measured from the first cycle after reset
    chk($sformatf("timing: halt reached at cycle %0d, stalls %0d", retire_cyc, n_stall),
        retire_cyc == 1 + 48 + 2 * 10 + 3 + n_stall);
    $display("stalls=%0d bflush=%0d jflush=%0d fwd=%0d", n_stall, n_bflush, n_jflush, n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
