// tb_controller_random: random scalar programs on the controller, compared
// with an instruction-level reference model written here. Each program has
// 300 ALU, shift, compare and immediate instructions over r0..r7 (so most
// instructions depend on the one before and exercise forwarding), mixed with
// forward branches of all four kinds and forward jumps that skip a few
// instructions, and ends in a halt loop. After the halt every register must
// match the model. Ten programs are run with a reset between them.
module tb_controller_random;
  import cp_pkg::*;
  import asm_pkg::*;
  localparam int N = 300;
  logic clk = 0, rst;
  logic imem_we;
  logic [9:0] imem_waddr;
  logic [31:0] imem_wdata, pe_out_instr, dbg_rdata, pc;
  logic dt_start, pe_out_valid, stall, flush_b, flush_j, fwd;
  logic [3:0] dt_bank;
  logic [5:0] dt_count;
  logic [15:0] dt_addr;
  logic [4:0] dbg_raddr;
  int checks = 0, failures = 0;

  controller dut (.clk, .rst, .imem_we, .imem_waddr, .imem_wdata, .dt_start, .dt_bank,
    .dt_count, .dt_addr, .dt_busy(1'b0), .pe_out_valid, .pe_out_instr, .pe_out_ready(1'b1),
    .dbg_raddr, .dbg_rdata, .pc, .stall, .flush_b, .flush_j, .fwd);
  always #5 clk = ~clk;

  logic [31:0] prog [1024];
  logic [31:0] ref_r [32];
  int n_taken, n_fwd;

  always @(posedge clk) if (!rst && fwd) n_fwd++;

  function automatic int rr();
    return $urandom_range(0, 7);
  endfunction

  function automatic logic [31:0] rand_instr(int idx);
    int k;
    k = $urandom_range(0, 19);
    case (k)
      0: return r_op(FN_ADD, rr(), rr(), rr());
      1: return r_op(FN_SUB, rr(), rr(), rr());
      2: return r_op(FN_AND, rr(), rr(), rr());
      3: return r_op(FN_OR, rr(), rr(), rr());
      4: return r_op(FN_XOR, rr(), rr(), rr());
      5: return r_op(FN_NOR, rr(), rr(), rr());
      6: return r_op(FN_SLLV, rr(), rr(), rr());
      7: return r_op(FN_SRAV, rr(), rr(), rr());
      8: return r_op(FN_SLT, rr(), rr(), rr());
      9: return r_op(FN_SLTU, rr(), rr(), rr());
      10: return i_op(OP_ADDI, rr(), rr(), $urandom_range(0, 65535));
      11: return i_op(OP_ORI, rr(), rr(), $urandom_range(0, 65535));
      12: return i_op(OP_LUI, rr(), 0, $urandom_range(0, 65535));
      13: return i_op(OP_SRLI, rr(), rr(), $urandom_range(0, 31));
      14: return i_op(OP_SLTI, rr(), rr(), $urandom_range(0, 65535));
      15: return br(OP_BNE, rr(), rr(), $urandom_range(1, 4));
      16: return br(OP_BEQ, rr(), rr(), $urandom_range(1, 4));
      17: return br(OP_BLT, rr(), rr(), $urandom_range(1, 4));
      18: return br(OP_BGE, rr(), rr(), $urandom_range(1, 4));
      default: return jmp(4 * $urandom_range(1, 3));
    endcase
  endfunction

  // reference model: returns the number of taken branches
  function automatic int run_ref();
    int p, taken;
    logic [31:0] i, a, b, imm_s, imm_z;
    p = 0; taken = 0;
    for (int r = 0; r < 32; r++) ref_r[r] = 0;
    while (p < N) begin
      i = prog[p];
      a = ref_r[i[25:21]]; b = ref_r[i[20:16]];
      imm_s = {{16{i[15]}}, i[15:0]}; imm_z = {16'h0, i[15:0]};
      p++;
      case (i[31:26])
        OP_RTYPE: begin
          logic [31:0] y;
          case (i[5:0])
            FN_ADD: y = a + b;   FN_SUB: y = a - b;   FN_AND: y = a & b;
            FN_OR:  y = a | b;   FN_XOR: y = a ^ b;   FN_NOR: y = ~(a | b);
            FN_SLLV: y = a << b[4:0];
            FN_SRAV: y = 32'($signed(a) >>> b[4:0]);
            FN_SLT: y = {31'b0, $signed(a) < $signed(b)};
            default: y = {31'b0, a < b};
          endcase
          if (i[15:11] != 0) ref_r[i[15:11]] = y;
        end
        OP_ADDI: if (i[20:16] != 0) ref_r[i[20:16]] = a + imm_s;
        OP_ORI:  if (i[20:16] != 0) ref_r[i[20:16]] = a | imm_z;
        OP_LUI:  if (i[20:16] != 0) ref_r[i[20:16]] = {i[15:0], 16'h0};
        OP_SRLI: if (i[20:16] != 0) ref_r[i[20:16]] = a >> imm_s[4:0];
        OP_SLTI: if (i[20:16] != 0) ref_r[i[20:16]] = {31'b0, $signed(a) < $signed(imm_s)};
        OP_BNE, OP_BEQ, OP_BLT, OP_BGE: begin
          logic t;
          case (i[31:26])
            OP_BNE: t = a != b;
            OP_BEQ: t = a == b;
            OP_BLT: t = $signed(a) < $signed(b);
            default: t = $signed(a) >= $signed(b);
          endcase
          if (t) begin p = p - 1 + int'(i[15:0]); taken++; end
        end
        OP_J: p = p - 1 + int'(i[15:0]) / 4;
        default: ;
      endcase
    end
    return taken;
  endfunction

  initial begin
    #50_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int halt_seen, guard;
    n_fwd = 0;
    imem_we = 0; imem_waddr = 0; imem_wdata = 0; dbg_raddr = 0;
    for (int t = 0; t < 10; t++) begin
      rst = 1;
      for (int i = 0; i < 1024; i++) prog[i] = 32'h0;
      // seed registers with values so the first instructions have data
      for (int r = 1; r < 8; r++) prog[r - 1] = i_op(OP_ADDI, r, 0, $urandom_range(0, 65535));
      for (int i = 7; i < N; i++) prog[i] = rand_instr(i);
      for (int i = N; i < N + 8; i++) prog[i] = jmp(0);   // halt (jumps may land past N)
      n_taken = run_ref();
      for (int i = 0; i < 1024; i++) begin
        @(negedge clk); imem_we = 1; imem_waddr = 10'(i); imem_wdata = prog[i];
      end
      @(negedge clk); imem_we = 0; rst = 0;
      guard = 0;
      while (!(flush_j && dut.pcD >= 32'(4 * N)) && guard < 5000) begin
        @(negedge clk); guard++;
      end
      checks++;
      if (guard >= 5000) begin failures++; $display("FAIL program %0d did not halt", t); end
      repeat (3) @(negedge clk);
      for (int r = 0; r < 32; r++) begin
        dbg_raddr = 5'(r); #1;
        checks++;
        if (dbg_rdata !== ref_r[r]) begin
          failures++;
          if (failures < 20) $display("FAIL program %0d r%0d = %h exp %h", t, r, dbg_rdata, ref_r[r]);
        end
      end
    end
    checks++;
    if (n_fwd == 0) begin failures++; $display("FAIL no forwarding seen"); end
    $display("forwards=%0d", n_fwd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
