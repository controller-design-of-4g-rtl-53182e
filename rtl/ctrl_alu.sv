// ctrl_alu: arithmetic logic unit of the controller (Execute stage).
//
// Performs the simple arithmetic, logic and shift operations the scalar
// program needs; the heavy signal processing runs on the PE array. The
// operation is chosen by control S12. Shifts move operand a by b[4:0]; LUI
// places b[15:0] in the upper half. The zero output (zeroE) is used by the
// branch-on-non-zero branch. Purely combinational. The list of operations is
// this design's choice.
module ctrl_alu
  import cp_pkg::*;
(
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  alu_op_e         op,
  output logic [XLEN-1:0] y,
  output logic            zero
);
  always_comb begin
    unique case (op)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_AND: y = a & b;
      ALU_OR : y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_NOR: y = ~(a | b);
      ALU_SLL: y = a << b[4:0];
      ALU_SRL: y = a >> b[4:0];
      ALU_SRA: y = $signed(a) >>> b[4:0];
      ALU_LUI: y = {b[15:0], 16'h0000};
      default: y = '0;
    endcase
  end
  assign zero = (y == '0);
endmodule
