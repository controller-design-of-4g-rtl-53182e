// tb_bank_addr_gen: the address starts at 0, advances only when inc is high
// and wraps at 2**AW (AW reduced to 4 to see the wrap quickly).
module tb_bank_addr_gen;
  logic clk = 0, rst, inc;
  logic [3:0] addr;
  int exp_a, checks = 0, failures = 0;

  bank_addr_gen #(.AW(4)) dut (.clk, .rst, .inc, .addr);
  always #5 clk = ~clk;

  initial begin
    #100_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; inc = 0;
    @(posedge clk); #1 rst = 0; exp_a = 0;
    for (int i = 0; i < 200; i++) begin
      checks++;
      if (addr !== 4'(exp_a)) begin failures++; $display("FAIL %0d exp %0d", addr, exp_a); end
      inc = $urandom_range(0, 2) != 0;
      @(posedge clk); #1;
      if (inc) exp_a = (exp_a + 1) % 16;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
