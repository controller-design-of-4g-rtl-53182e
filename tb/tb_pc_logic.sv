// tb_pc_logic: reset to 0, sequential +4, branch, jump, jump over branch
// priority (mux B after mux A) and hold when disabled, cycle by cycle.
module tb_pc_logic;
  logic clk = 0, rst, en, be, jumpd;
  logic [31:0] pcbe, pcjd, pc, pcplus4, exp_pc;
  int checks = 0, failures = 0;

  pc_logic dut (.clk, .rst, .en, .be, .pcbe, .jumpd, .pcjd, .pc, .pcplus4);
  always #5 clk = ~clk;

  initial begin
    #100_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 1; be = 0; jumpd = 0; pcbe = 0; pcjd = 0;
    @(posedge clk); #1 rst = 0;
    exp_pc = 0;
    for (int i = 0; i < 400; i++) begin
      checks++;
      if (pc !== exp_pc || pcplus4 !== exp_pc + 4) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d pc=%h exp=%h", i, pc, exp_pc);
      end
      en = ($urandom_range(0, 7) != 0);
      be = ($urandom_range(0, 3) == 0);
      jumpd = ($urandom_range(0, 4) == 0);
      pcbe = {$urandom} & 32'hFFFC;
      pcjd = {$urandom} & 32'hFFFC;
      if (en) exp_pc = jumpd ? pcjd : (be ? pcbe : exp_pc + 4);
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
