// tb_data_transfer_unit: drives MOV-style starts (including the published
// example: bank 1, count 3, address 0) and count = 0, and checks that exactly
// count words arrive, in order, from consecutive global addresses, one per
// cycle, at the right bank, with the first word two cycles after start and
// busy high from the cycle after start until the last write.
module tb_data_transfer_unit;
  logic clk = 0, rst, start, busy, gm_re, wr_en, gwe;
  logic [3:0] bank;
  logic [5:0] count;
  logic [15:0] addr, gm_raddr, gwaddr;
  logic [127:0] gm_rdata, wr_data, gwdata;
  logic [2:0] wr_bank;
  int checks = 0, failures = 0;

  data_transfer_unit dut (.clk, .rst, .start, .bank, .count, .addr, .busy,
                          .gm_re, .gm_raddr, .gm_rdata, .wr_en, .wr_bank, .wr_data);
  global_memory gm (.clk, .we(gwe), .waddr(gwaddr), .wdata(gwdata),
                    .re(gm_re), .raddr(gm_raddr), .rdata(gm_rdata));
  always #5 clk = ~clk;

  function automatic logic [127:0] pat(logic [15:0] a);
    return {a, ~a, a ^ 16'h5A5A, 16'hC0DE, a, 16'(a * 3), 16'(a + 9), ~a};
  endfunction

  task automatic chk(string s, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic run(int b, int n, int a);
    int got, cyc, first;
    got = 0; first = -1;
    @(negedge clk);
    start = 1; bank = 4'(b); count = 6'(n); addr = 16'(a);
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (cyc < 80) begin
      if (wr_en) begin
        if (first < 0) first = cyc;
        chk("data", wr_data === pat(16'(a + got)));
        chk("bank", wr_bank === 3'(b));
        chk("one per cycle", cyc == first + got);
        got++;
      end
      chk("busy", busy === (n > 0 && cyc <= n + 1));
      @(negedge clk);
      cyc++;
    end
    chk($sformatf("count %0d got %0d", n, got), got == n);
    if (n > 0) chk("latency", first == 2);
  endtask

  initial begin
    #1_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0; bank = 0; count = 0; addr = 0; gwe = 0; gwaddr = 0; gwdata = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk); gwe = 1; gwaddr = 16'(i); gwdata = pat(16'(i));
    end
    for (int i = 0; i < 8; i++) begin
      @(negedge clk); gwe = 1; gwaddr = 16'(16'hFFF8 + i); gwdata = pat(16'(16'hFFF8 + i));
    end
    @(negedge clk); gwe = 0; rst = 0;
    run(1, 3, 0);        // published example
    run(0, 1, 17);
    run(7, 63, 200);
    run(12, 5, 40);      // bank_index[3] is ignored
    run(2, 0, 5);
    run(3, 8, 16'hFFF8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
