// tb_instr_buffer: random pushes and pops against a queue model; checks the
// head word, empty and full every cycle, including fill to full and drain.
module tb_instr_buffer;
  logic clk = 0, rst, we, re, empty, full;
  logic [31:0] instr, out;
  logic [31:0] q [$];
  int checks = 0, failures = 0;

  instr_buffer dut (.clk, .rst, .we, .instr, .re, .inst_out(out), .empty, .full);
  always #5 clk = ~clk;

  initial begin
    #1_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fulls;
    fulls = 0;
    rst = 1; we = 0; re = 0; instr = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      int phase;   // 0: mostly push, 1: mixed, 2: mostly pop
      phase = (i / 100) % 3;
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == 16) ||
          (q.size() > 0 && out !== q[0])) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d size=%0d empty=%b full=%b", i, q.size(), empty, full);
      end
      if (full) fulls++;
      we = !full && ($urandom_range(0, 3) < (phase == 0 ? 3 : (phase == 1 ? 2 : 1)));
      re = !empty && ($urandom_range(0, 3) < (phase == 2 ? 3 : (phase == 1 ? 2 : 1)));
      instr = $urandom;
      @(posedge clk);
      if (re) void'(q.pop_front());
      if (we) q.push_back(instr);
      #1;
    end
    checks++; if (fulls == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
