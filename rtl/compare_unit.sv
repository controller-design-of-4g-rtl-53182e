// compare_unit: comparison unit of the controller (Execute stage).
//
// Compares the two Execute operands as chosen by control S11 and returns the
// outcome zero-extended to 32 bits (cresultE). Bit 0 drives the compare
// branch; the full word is written back by the set-less-than instructions.
// Combinational. The set of comparisons is this design's choice.
module compare_unit
  import cp_pkg::*;
(
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  cmp_op_e         op,
  output logic [XLEN-1:0] cresult
);
  logic r;
  always_comb begin
    unique case (op)
      CMP_EQ : r = (a == b);
      CMP_NE : r = (a != b);
      CMP_LT : r = ($signed(a) < $signed(b));
      CMP_LTU: r = (a < b);
      CMP_GE : r = ($signed(a) >= $signed(b));
      CMP_GEU: r = (a >= b);
      default: r = 1'b0;
    endcase
  end
  assign cresult = {{(XLEN-1){1'b0}}, r};
endmodule
