// tb_instr_mem: loads random words through the write port and reads them
// back through the byte-addressed combinational read port (low two address
// bits ignored).
module tb_instr_mem;
  logic clk = 0, we;
  logic [9:0] waddr;
  logic [31:0] wdata, addr, instr;
  logic [31:0] shadow [1024];
  int checks = 0, failures = 0;

  instr_mem dut (.clk, .addr, .instr, .we, .waddr, .wdata);
  always #5 clk = ~clk;

  initial begin
    #1_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; waddr = 10'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 600; i++) begin
      int w;
      w = $urandom_range(0, 1023);
      addr = {20'h0, 10'(w), 2'($urandom)};
      #1;
      checks++;
      if (instr !== shadow[w]) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%h instr=%h exp=%h", addr, instr, shadow[w]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
