// branch_ctrl: branch decision of the Execute stage.
//
// bE = (~zeroE & S15) | (S9 & cresultE[0]), as published. The first term
// (btE) takes a branch when the ALU result is not zero; the second (bothE)
// when the compare unit reports true. bE selects the branch target in the PC
// logic and flushes the two younger instructions. Combinational.
module branch_ctrl (
  input  logic zero,    // zeroE from the ALU
  input  logic s15,     // branch on non-zero ALU result
  input  logic s9,      // branch on compare result
  input  logic cres0,   // cresultE[0]
  output logic bt,      // btE
  output logic both,    // bothE
  output logic be       // bE
);
  assign bt   = ~zero & s15;
  assign both = s9 & cres0;
  assign be   = bt | both;
endmodule
