// tb_interface_module: mixes data transfers with PE and load instructions.
// A model keeps each bank's written words in order and each bank's read
// position; every instruction is turned into an expected output event (a PE
// instruction, or a load's read mask, entry and data). The monitor checks the
// events arrive in order, that nothing leaves while a transfer is busy, that
// buffered instructions drain one per cycle, and that with no transfer an
// instruction bypasses the buffer and appears one cycle later.
module tb_interface_module;
  import cp_pkg::*;
  logic clk = 0, rst;
  logic in_valid, in_ready, xfer_busy, dt_we, pe_valid, buffered;
  logic [31:0] in_instr, pe_instr;
  logic [2:0] dt_bank;
  logic [127:0] dt_data;
  logic [7:0] ld_we;
  logic [3:0] ld_entry;
  logic [7:0][127:0] ld_data;
  int checks = 0, failures = 0;

  interface_module dut (.clk, .rst, .in_valid, .in_instr, .in_ready, .xfer_busy,
    .dt_we, .dt_bank, .dt_data, .pe_valid, .pe_instr, .ld_we, .ld_entry, .ld_data, .buffered);
  always #5 clk = ~clk;

  // model
  logic [127:0] bankq [8][$];
  int rdpos [8];
  typedef struct { logic is_pe; logic [31:0] instr; logic [7:0] mask; logic [3:0] entry;
                   logic [7:0][127:0] data; } ev_t;
  ev_t expq [$];
  int n_out = 0, n_buffered = 0;

  task automatic chk(string s, logic cond);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s @%0t", s, $time); end
  endtask

  function automatic logic [31:0] ld_instr(int m, int b, int e);
    return {4'b0101, 2'(m), 1'b0, 3'(b), 2'b00, 4'(e), 16'h0};
  endfunction

  // model the effect of an instruction when it is decoded (order = issue order)
  function automatic void expect_instr(logic [31:0] i);
    ev_t ev;
    ev.instr = i; ev.is_pe = !is_load(i); ev.mask = 0; ev.entry = i[19:16]; ev.data = '0;
    if (!ev.is_pe) begin
      int n = 1 << i[27:26];
      int base = (int'(i[24:22]) / n) * n;
      for (int b = base; b < base + n; b++) begin
        ev.mask[b] = 1'b1;
        ev.data[b] = bankq[b][rdpos[b]];
        rdpos[b]++;
      end
    end
    expq.push_back(ev);
  endfunction

  // monitor
  always @(posedge clk) if (!rst) begin
    if (pe_valid || ld_we != 0) begin
      ev_t ev;
      n_out++;
      if (expq.size() == 0) chk("unexpected output", 0);
      else begin
        ev = expq.pop_front();
        if (ev.is_pe) chk("pe instr", pe_valid && ld_we == 0 && pe_instr == ev.instr);
        else begin
          chk("load mask/entry", !pe_valid && ld_we == ev.mask && ld_entry == ev.entry);
          for (int b = 0; b < 8; b++) if (ev.mask[b]) chk("load data", ld_data[b] == ev.data[b]);
        end
      end
    end
    if (buffered) n_buffered++;
  end

  task automatic send(logic [31:0] i);
    @(negedge clk);
    chk("ready", in_ready);
    in_valid = 1; in_instr = i;
    expect_instr(i);
    @(negedge clk);
    in_valid = 0;
  endtask

  // transfer of n words into bank b, with PE/load instructions sent meanwhile
  task automatic transfer(int b, int n, int n_side);
    int t0, drained_at;
    @(negedge clk);
    xfer_busy = 1;
    for (int k = 0; k < n; k++) begin
      dt_we = 1; dt_bank = 3'(b); dt_data = {$urandom, $urandom, $urandom, $urandom};
      bankq[b].push_back(dt_data);
      if (k < n_side) begin
        in_valid = 1;
        in_instr = (k % 2 == 0) ? (32'h8000_0000 | 32'($urandom_range(0, 255)))
                                : ld_instr(0, b, k % 16);
      end else in_valid = 0;
      // a load sent during the transfer is only decoded after it, so its
      // data will be the transferred words: model it after the loop
      @(negedge clk);
    end
    dt_we = 0;
    in_valid = 0;
    xfer_busy = 0;
  endtask

  initial begin
    #2_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_before, t0;
    logic [31:0] side [$];
    rst = 1; in_valid = 0; in_instr = 0; xfer_busy = 0; dt_we = 0; dt_bank = 0; dt_data = 0;
    for (int b = 0; b < 8; b++) rdpos[b] = 0;
    repeat (2) @(negedge clk);
    rst = 0;

    // 1) bypass: a PE instruction with no transfer appears one cycle later
    @(negedge clk); in_valid = 1; in_instr = 32'h8000_1234; expect_instr(in_instr);
    @(posedge clk); #1; in_valid = 0;
    chk("bypass not buffered", n_buffered == 0);
    @(posedge clk); #1;
    chk("bypass latency 1", n_out == 1);

    // 2) fill all eight banks with 12 words each, no instructions meanwhile
    for (int b = 0; b < 8; b++) transfer(b, 12, 0);

    // 3) loads of every width, bypassing the buffer
    for (int m = 0; m < 4; m++)
      for (int b = 0; b < 8; b += (1 << m)) send(ld_instr(m, b, (m * 4 + b) % 16));

    // 4) transfer into bank 5 with PE and load instructions arriving meanwhile
    repeat (2) @(negedge clk);
    n_before = n_out;
    @(negedge clk);
    xfer_busy = 1;
    for (int k = 0; k < 10; k++) begin
      dt_we = 1; dt_bank = 3'd5; dt_data = {$urandom, $urandom, $urandom, $urandom};
      bankq[5].push_back(dt_data);
      in_valid = 1;
      in_instr = (k % 2 == 0) ? (32'h8000_0000 | 32'(k)) : ld_instr(0, 5, k);
      side.push_back(in_instr);
      @(negedge clk);
      chk("held while busy", n_out == n_before);
    end
    dt_we = 0; in_valid = 0;
    foreach (side[k]) expect_instr(side[k]);
    chk("all buffered", n_buffered == 10);
    @(negedge clk);
    xfer_busy = 0;
    t0 = n_out;
    repeat (10) @(negedge clk);
    chk("drain one per cycle", n_out == t0 + 9);   // first output appears one cycle after release
    repeat (3) @(negedge clk);
    chk("all drained", n_out == t0 + 10);
    chk("all events seen", expq.size() == 0);

    // 5) an instruction arriving while the buffer drains queues behind it
    @(negedge clk); xfer_busy = 1; in_valid = 1; in_instr = 32'h8000_00AA;
    @(negedge clk); in_instr = 32'h8000_00BB;
    @(negedge clk); xfer_busy = 0; in_instr = 32'h8000_00CC;
    expect_instr(32'h8000_00AA); expect_instr(32'h8000_00BB); expect_instr(32'h8000_00CC);
    @(negedge clk); in_valid = 0;
    repeat (6) @(negedge clk);
    chk("order kept", expq.size() == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
