// hazard_unit: data hazard detection for forwarding.
//
// The instruction in Execute writes its result back at the end of that
// stage, so the instruction behind it in Decode would read a stale register.
// When S14 says the Execute instruction writes a register and its destination
// (regdstE) equals a source field of the Decode instruction (Instr[25:21] or
// Instr[20:16]), haE / hbE select the Execute result instead of the register
// file for that operand. r0 is never forwarded. Combinational.
module hazard_unit (
  input  logic [4:0] rs,       // Instr[25:21] in Decode
  input  logic [4:0] rt,       // Instr[20:16] in Decode
  input  logic [4:0] regdste,
  input  logic       s14,
  output logic       ha,
  output logic       hb
);
  assign ha = s14 && (regdste != 5'd0) && (regdste == rs);
  assign hb = s14 && (regdste != 5'd0) && (regdste == rt);
endmodule
