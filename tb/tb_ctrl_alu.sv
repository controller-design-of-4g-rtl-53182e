// tb_ctrl_alu: random and corner operands for every ALU operation, checked
// against a reference written with plain SystemVerilog operators; also
// checks the zero flag.
module tb_ctrl_alu;
  import cp_pkg::*;
  logic [31:0] a, b, y, exp_y;
  alu_op_e op;
  logic zero;
  int checks = 0, failures = 0;

  ctrl_alu dut (.a, .b, .op, .y, .zero);

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] z);
    int s = int'(z[4:0]);
    case (o)
      ALU_ADD: return x + z;
      ALU_SUB: return x - z;
      ALU_AND: return x & z;
      ALU_OR : return x | z;
      ALU_XOR: return x ^ z;
      ALU_NOR: return ~(x | z);
      ALU_SLL: return x << s;
      ALU_SRL: return x >> s;
      ALU_SRA: return 32'($signed(x) >>> s);
      default: return {z[15:0], 16'h0};
    endcase
  endfunction

  initial begin
    #1_000_000 failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      op = alu_op_e'(i % 10);
      a  = (i % 7 == 0) ? 32'h8000_0000 : $urandom;
      b  = (i % 11 == 0) ? a : $urandom;
      #1;
      exp_y = ref_alu(op, a, b);
      checks++;
      if (y !== exp_y || zero !== (exp_y == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL op=%0d a=%h b=%h y=%h exp=%h", op, a, b, y, exp_y);
      end
    end
    // fixed cases
    op = ALU_SRA; a = 32'hF000_0000; b = 32'd4; #1; checks++; if (y !== 32'hFF00_0000) failures++;
    op = ALU_SUB; a = 32'd5; b = 32'd5; #1; checks++; if (!zero) failures++;
    op = ALU_LUI; a = 32'd0; b = 32'h0000_1234; #1; checks++; if (y !== 32'h1234_0000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
