// tb_addr_gen_unit: random immediates, PCs and register values under every
// S1/S2/S3 setting; the expected targets are computed independently.
module tb_addr_gen_unit;
  logic [31:0] extimm, pcd, srca, pcj, pcb, t;
  logic s1, s2, s3;
  int checks = 0, failures = 0;

  addr_gen_unit dut (.extimm, .pcd, .srca, .s1, .s2, .s3, .pcj, .pcb);

  initial begin
    #1_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      extimm = {{16{$urandom_range(0,1) == 1}}, 16'($urandom)};
      pcd    = {$urandom} & 32'hFFFF_FFFC;
      srca   = $urandom;
      {s1, s2, s3} = 3'(i);
      #1;
      if (s2) t = srca;
      else if (s1) t = pcd + extimm;
      else t = pcd + extimm * 4;
      checks++;
      if ((s3 && (pcj !== t || pcb !== 0)) || (!s3 && (pcb !== t || pcj !== 0))) begin
        failures++;
        if (failures < 10) $display("FAIL s=%b%b%b pcj=%h pcb=%h exp=%h", s1, s2, s3, pcj, pcb, t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
