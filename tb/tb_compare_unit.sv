// tb_compare_unit: all six comparisons on random, equal and sign-boundary
// operands against a reference model.
module tb_compare_unit;
  import cp_pkg::*;
  logic [31:0] a, b, c;
  cmp_op_e op;
  logic e;
  int checks = 0, failures = 0;

  compare_unit dut (.a, .b, .op, .cresult(c));

  initial begin
    #1_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      op = cmp_op_e'(i % 6);
      a  = (i % 5 == 0) ? 32'h8000_0000 : $urandom;
      b  = (i % 3 == 0) ? a : ((i % 13 == 0) ? 32'h7FFF_FFFF : $urandom);
      #1;
      case (op)
        CMP_EQ : e = a == b;
        CMP_NE : e = a != b;
        CMP_LT : e = $signed(a) < $signed(b);
        CMP_LTU: e = a < b;
        CMP_GE : e = $signed(a) >= $signed(b);
        default: e = a >= b;
      endcase
      checks++;
      if (c !== {31'b0, e}) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d a=%h b=%h c=%h", op, a, b, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
