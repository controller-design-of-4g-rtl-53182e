// load_decoder: load decoder of a PE interface module.
//
// Looks at each instruction leaving the interface (from the buffer or
// bypassing it). A load instruction (opcode 0101mm) turns into read enables
// for the PE's local banks and the register-file entry to fill; anything else
// is a PE instruction and is only flagged for passing on to the PE decoder.
// The two opcode bits mm are the algorithm width and pick one of four
// read-enable patterns: 00 single-entry (one bank), 01 2-entry (two banks),
// 10 4-entry (four banks), 11 8-entry (all eight banks). The pattern starts
// at bank instr[24:22] rounded down to a multiple of its size; the register
// entry is instr[19:16]. The four load modes follow the published
// description; the encoding and the bank base field are this design's
// choice. Combinational.
module load_decoder
  import cp_pkg::*;
(
  input  logic            valid,
  input  logic [ILEN-1:0] instr,
  output logic            ld,         // a load instruction
  output logic            pe_valid,   // a PE instruction to pass on
  output width_e          width,      // algorithm width
  output logic [NBANK-1:0] re,        // bank read enables
  output logic [3:0]      entry
);
  logic [2:0] base;

  assign ld       = valid && is_load(instr);
  assign pe_valid = valid && !is_load(instr);
  assign width    = width_e'(instr[27:26]);
  assign entry    = instr[19:16];

  always_comb begin
    unique case (width)
      W_1: begin base = instr[24:22];               re = 8'b0000_0001 << base; end
      W_2: begin base = {instr[24:23], 1'b0};       re = 8'b0000_0011 << base; end
      W_4: begin base = {instr[24], 2'b00};         re = 8'b0000_1111 << base; end
      default: begin base = 3'd0;                   re = 8'b1111_1111;         end
    endcase
    if (!ld) re = '0;
  end
endmodule
