// tb_ctrl_regfile: random writes and reads against a shadow array; r0 stays
// zero when written; a read in the cycle of a write sees the old value.
module tb_ctrl_regfile;
  logic clk = 0, rst, we;
  logic [4:0] ra1, ra2, wa, dra;
  logic [31:0] rd1, rd2, wd, drd;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  ctrl_regfile dut (.clk, .rst, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd, .dbg_ra(dra), .dbg_rd(drd));
  always #5 clk = ~clk;

  initial begin
    #100_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0; dra = 0;
    for (int i = 0; i < 32; i++) shadow[i] = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 1000; i++) begin
      we = $urandom_range(0, 1); wa = 5'($urandom); wd = $urandom;
      ra1 = (i % 3 == 0) ? wa : 5'($urandom); ra2 = 5'($urandom); dra = 5'($urandom);
      #1;
      checks++;
      if (rd1 !== shadow[ra1] || rd2 !== shadow[ra2] || drd !== shadow[dra]) begin
        failures++;
        if (failures < 10) $display("FAIL ra1=%0d rd1=%h exp=%h", ra1, rd1, shadow[ra1]);
      end
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
