// tb_comm_proc_top: end-to-end run of the whole design at its default
// parameters. The host fills global memory (word a holds pattern pat(a))
// and the instruction memory; the program then
//   - runs a counted loop with back-to-back dependences (forwarding, BNE),
//   - issues eight MOVs in a row filling banks 0..7 with 4 words each (every
//     MOV after the first waits for the transfer unit),
//   - sends PE and load instructions while a transfer runs (buffered), loads
//     of all four widths (1, 2, 4 and 8 banks),
//   - starts a 40-word transfer and sends 20 PE instructions during it, so
//     the 16-entry instruction buffers fill and the controller stalls,
//   - calls a function with JLINK and returns, jumps over a squashed
//     instruction, waits in a loop and sends a last PE instruction that
//     bypasses the buffers.
// Checked: controller registers, the PE instruction stream of every PE,
// every lane of the PE register-file rows the loads filled (via the read
// ports), the 40-cycle back-to-back write burst of the long transfer, and
// that each mechanism happened at least once.
module tb_comm_proc_top;
  import cp_pkg::*;
  import asm_pkg::*;
  localparam int NP = 4;
  logic clk = 0, rst;
  logic imem_we, gm_we;
  logic [9:0] imem_waddr;
  logic [31:0] imem_wdata;
  logic [15:0] gm_waddr;
  logic [127:0] gm_wdata;
  logic [NP-1:0] pe_valid;
  logic [NP-1:0][31:0] pe_instr;
  logic [NP-1:0][3:0] rf_ra, rf_rb, rf_rc;
  logic [NP-1:0][63:0][15:0] rf_a, rf_b, rf_c;
  logic [4:0] dbg_raddr;
  logic [31:0] dbg_rdata, pc;
  logic dt_busy, stall, flush_b, flush_j, fwd, dt_wr;
  logic [NP-1:0] buffered;
  logic [NP-1:0][7:0] ld_we;
  int checks = 0, failures = 0;

  comm_proc_top dut (.*);
  always #5 clk = ~clk;

  function automatic logic [127:0] pat(int a);
    logic [127:0] v;
    for (int k = 0; k < 8; k++) v[16*k +: 16] = 16'(a * 8 + k) ^ 16'hA000;
    return v;
  endfunction

  task automatic chk(string s, logic cond);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", s); end
  endtask

  logic [31:0] prog [64];
  logic [31:0] exp_pe [$];
  initial begin
    for (int i = 0; i < 64; i++) prog[i] = 32'h0;
    prog[0] = i_op(OP_ADDI, 1, 0, 4);
    prog[1] = i_op(OP_ADDI, 2, 0, 0);
    prog[2] = i_op(OP_ADDI, 2, 2, 8);
    prog[3] = i_op(OP_ADDI, 1, 1, -1);
    prog[4] = br(OP_BNE, 1, 0, -2);
    for (int b = 0; b < 8; b++) prog[5 + b] = mov(b, 4, 4 * b);
    prog[13] = pe(1);
    prog[14] = load(0, 3, 0);
    prog[15] = load(1, 4, 1);
    prog[16] = load(2, 0, 2);
    prog[17] = load(3, 0, 3);
    prog[18] = pe(2);
    prog[19] = mov(6, 40, 100);
    for (int k = 0; k < 20; k++) prog[20 + k] = pe(100 + k);
    prog[40] = load(0, 6, 5);
    prog[41] = i_op(OP_ADDI, 5, 0, 240);
    prog[42] = jlink(5);
    prog[43] = i_op(OP_ADDI, 6, 2, 1);
    prog[44] = jmp(8);
    prog[45] = i_op(OP_ADDI, 7, 0, 5);
    prog[46] = i_op(OP_ADDI, 8, 0, 60);
    prog[47] = i_op(OP_ADDI, 8, 8, -1);
    prog[48] = br(OP_BNE, 8, 0, -1);
    prog[49] = pe(3);
    prog[50] = jmp(0);
    prog[60] = i_op(OP_ADDI, 9, 0, 11);
    prog[61] = jlink(31);
    exp_pe = '{pe(1), pe(2)};
    for (int k = 0; k < 20; k++) exp_pe.push_back(pe(100 + k));
    exp_pe.push_back(pe(3));
  end

  // monitors
  logic [31:0] got_pe [NP][$];
  int n_mov_stall = 0, n_full_stall = 0, n_buffered = 0, n_bypass = 0, n_bflush = 0;
  int n_jflush = 0, n_fwd = 0, n_dtwr = 0, run = 0, max_run = 0;
  int n_w [4] = '{0, 0, 0, 0};
  logic halted = 1'b0;
  always @(posedge clk) if (!rst) begin
    for (int p = 0; p < NP; p++) if (pe_valid[p]) got_pe[p].push_back(pe_instr[p]);
    if (stall && dut.u_ctl.ctrlD.mov) n_mov_stall++;
    if (stall && dut.u_ctl.ctrlD.pe_pass && !dut.ctl_ready) n_full_stall++;
    if (buffered[0]) n_buffered++;
    if (dut.ctl_valid && !buffered[0]) n_bypass++;
    if (flush_b) n_bflush++;
    if (flush_j) n_jflush++;
    if (fwd) n_fwd++;
    if (flush_j && dut.u_ctl.pcD == 32'd200) halted = 1'b1;
    if (dt_wr) begin n_dtwr++; run++; if (run > max_run) max_run = run; end
    else run = 0;
    case ($countones(ld_we[0]))
      1: n_w[0]++;
      2: n_w[1]++;
      4: n_w[2]++;
      8: n_w[3]++;
      default: ;
    endcase
  end

  initial begin
    #20_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected register-file rows: (group, entry) -> global memory word
  int exp_row [8][16];

  initial begin
    logic [31:0] expv [32];
    rst = 1; imem_we = 0; imem_waddr = 0; imem_wdata = 0; gm_we = 0; gm_waddr = 0; gm_wdata = 0;
    rf_ra = '0; rf_rb = '0; rf_rc = '0; dbg_raddr = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 10'(i); imem_wdata = (i < 64) ? prog[i] : 32'h0;
      gm_we = (i < 160); gm_waddr = 16'(i); gm_wdata = pat(i);
    end
    @(negedge clk); imem_we = 0; gm_we = 0; rst = 0;
    wait (halted);
    repeat (4) @(negedge clk);

    for (int r = 0; r < 32; r++) expv[r] = 0;
    expv[2] = 32; expv[5] = 240; expv[6] = 33; expv[9] = 11; expv[31] = 248;
    for (int r = 0; r < 32; r++) begin
      dbg_raddr = 5'(r); #1;
      chk($sformatf("r%0d = %0d exp %0d", r, dbg_rdata, expv[r]), dbg_rdata === expv[r]);
    end

    for (int p = 0; p < NP; p++) begin
      chk($sformatf("PE%0d instruction count %0d", p, got_pe[p].size()), got_pe[p].size() == exp_pe.size());
      foreach (exp_pe[i]) if (i < got_pe[p].size()) chk("PE instruction order", got_pe[p][i] == exp_pe[i]);
    end

    for (int g = 0; g < 8; g++) for (int e = 0; e < 16; e++) exp_row[g][e] = -1;
    exp_row[3][0] = 12;
    exp_row[4][1] = 16; exp_row[5][1] = 20;
    exp_row[0][2] = 0;  exp_row[1][2] = 4;  exp_row[2][2] = 8;  exp_row[3][2] = 13;
    exp_row[0][3] = 1;  exp_row[1][3] = 5;  exp_row[2][3] = 9;  exp_row[3][3] = 14;
    exp_row[4][3] = 17; exp_row[5][3] = 21; exp_row[6][3] = 24; exp_row[7][3] = 28;
    exp_row[6][5] = 25;
    for (int e = 0; e < 16; e++) begin
      rf_ra = {NP{4'(e)}}; rf_rb = {NP{4'(e)}}; rf_rc = {NP{4'(e)}};
      #1;
      for (int p = 0; p < NP; p++)
        for (int g = 0; g < 8; g++)
          if (exp_row[g][e] >= 0)
            for (int k = 0; k < 8; k++) begin
              logic [127:0] w;
              w = pat(exp_row[g][e]);
              chk($sformatf("PE%0d RF group %0d entry %0d lane %0d", p, g, e, 8 * g + k),
                  rf_a[p][8 * g + k] === w[16*k +: 16] && rf_b[p][8 * g + k] === w[16*k +: 16] &&
                  rf_c[p][8 * g + k] === w[16*k +: 16]);
            end
    end

    chk("words written = 8*4 + 40", n_dtwr == 72);
    chk($sformatf("40-word burst at one word per cycle (max run %0d)", max_run), max_run == 40);
    chk("mechanism: MOV waits for transfer unit", n_mov_stall > 0);
    chk("mechanism: instruction buffer full stall", n_full_stall > 0);
    chk("mechanism: instructions buffered during transfer", n_buffered > 0);
    chk("mechanism: instruction bypasses buffer", n_bypass > 0);
    chk("mechanism: taken branch flush", n_bflush > 0);
    chk("mechanism: jump flush", n_jflush > 0);
    chk("mechanism: forwarding", n_fwd > 0);
    for (int m = 0; m < 4; m++) chk($sformatf("mechanism: load width %0d", 1 << m), n_w[m] > 0);
    $display("mov_stall=%0d full_stall=%0d buffered=%0d bypass=%0d bflush=%0d jflush=%0d fwd=%0d dtwr=%0d loads=%0d/%0d/%0d/%0d",
      n_mov_stall, n_full_stall, n_buffered, n_bypass, n_bflush, n_jflush, n_fwd, n_dtwr,
      n_w[0], n_w[1], n_w[2], n_w[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
