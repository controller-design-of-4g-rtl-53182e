// tb_load_decoder: every width code and every bank base for load
// instructions, plus PE instructions and an idle input; read enables, entry
// and the pass-on flag are compared with an independent model.
module tb_load_decoder;
  import cp_pkg::*;
  logic valid, ld, pe_valid;
  logic [31:0] instr;
  width_e width;
  logic [7:0] re, exp_re;
  logic [3:0] entry;
  int checks = 0, failures = 0;

  load_decoder dut (.valid, .instr, .ld, .pe_valid, .width, .re, .entry);

  initial begin
    #1_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 4; m++)
      for (int bb = 0; bb < 8; bb++) begin
        int n, base;
        n = 1 << m;
        base = (bb / n) * n;
        valid = 1;
        instr = {4'b0101, 2'(m), 1'b0, 3'(bb), 2'b00, 4'(bb + m), 16'h0};
        #1;
        exp_re = 8'((1 << n) - 1) << base;
        checks++;
        if (!ld || pe_valid || re !== exp_re || entry !== 4'(bb + m) || width !== width_e'(m)) begin
          failures++;
          $display("FAIL m=%0d bank=%0d re=%b exp=%b entry=%0d", m, bb, re, exp_re, entry);
        end
      end
    valid = 1; instr = 32'h8000_00FF; #1;
    checks++; if (ld || !pe_valid || re !== 0) failures++;
    valid = 0; instr = 32'h5400_0000; #1;
    checks++; if (ld || pe_valid || re !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
