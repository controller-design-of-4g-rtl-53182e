// tb_branch_ctrl: exhaustive check of bE = (~zeroE & S15) | (S9 & cresultE[0])
// and of its two terms.
module tb_branch_ctrl;
  logic zero, s15, s9, cres0, bt, both, be;
  int checks = 0, failures = 0;

  branch_ctrl dut (.zero, .s15, .s9, .cres0, .bt, .both, .be);

  initial begin
    #100_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {zero, s15, s9, cres0} = 4'(i);
      #1;
      checks++;
      if (bt !== (!zero && s15) || both !== (s9 && cres0) ||
          be !== ((!zero && s15) || (s9 && cres0))) begin
        failures++;
        $display("FAIL in=%b bt=%b both=%b be=%b", 4'(i), bt, both, be);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
