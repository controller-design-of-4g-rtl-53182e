// tb_pe_regfile: random group-masked row writes against a lane-level model;
// every lane of ports A, B and C is compared after each write.
module tb_pe_regfile;
  logic clk = 0;
  logic [7:0] we;
  logic [3:0] entry, ra, rb, rc;
  logic [7:0][127:0] wdata;
  logic [63:0][15:0] a, b, c;
  logic [15:0] model [16][64];
  int checks = 0, failures = 0;

  pe_regfile dut (.clk, .we, .entry, .wdata, .ra, .rb, .rc, .a, .b, .c);
  always #5 clk = ~clk;

  initial begin
    #1_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill everything first so the model is defined
    for (int e = 0; e < 16; e++) begin
      @(negedge clk);
      we = 8'hFF; entry = 4'(e);
      for (int g = 0; g < 8; g++) wdata[g] = {$urandom, $urandom, $urandom, $urandom};
      for (int l = 0; l < 64; l++) model[e][l] = wdata[l / 8][16 * (l % 8) +: 16];
    end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we = 8'($urandom); entry = 4'($urandom);
      for (int g = 0; g < 8; g++) wdata[g] = {$urandom, $urandom, $urandom, $urandom};
      for (int l = 0; l < 64; l++) if (we[l / 8]) model[entry][l] = wdata[l / 8][16 * (l % 8) +: 16];
      ra = 4'($urandom); rb = entry; rc = 4'($urandom);
      @(posedge clk); #1;
      for (int l = 0; l < 64; l++) begin
        checks++;
        if (a[l] !== model[ra][l] || b[l] !== model[rb][l] || c[l] !== model[rc][l]) begin
          failures++;
          if (failures < 10) $display("FAIL lane %0d entry %0d", l, rb);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
