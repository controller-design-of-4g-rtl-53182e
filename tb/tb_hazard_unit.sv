// tb_hazard_unit: exhaustive over register ids (sampled) and S14: forwarding
// is selected exactly when S14 is set and the Execute destination, not r0,
// equals the Decode source.
module tb_hazard_unit;
  logic [4:0] rs, rt, rd;
  logic s14, ha, hb;
  int checks = 0, failures = 0;

  hazard_unit dut (.rs, .rt, .regdste(rd), .s14, .ha, .hb);

  initial begin
    #1_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 32; r++)
      for (int s = 0; s < 32; s++)
        for (int w = 0; w < 2; w++) begin
          rd = 5'(r); rs = 5'(s); rt = 5'((s * 7 + 3) % 32); s14 = w[0];
          if ((s % 4) == 0) rt = rd;
          #1;
          checks++;
          if (ha !== (s14 && rd != 0 && rd == rs) || hb !== (s14 && rd != 0 && rd == rt)) begin
            failures++;
            if (failures < 10) $display("FAIL rd=%0d rs=%0d rt=%0d s14=%b ha=%b hb=%b", rd, rs, rt, s14, ha, hb);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
