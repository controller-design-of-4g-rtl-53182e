// instr_mem: instruction memory of the controller.
//
// Holds DEPTH 32-bit instructions. The Fetch stage presents the byte address
// held in the PC register and gets the instruction back in the same cycle
// (combinational read, as the PC register drives the memory address directly
// and the instruction goes straight into the Fetch/Decode registers). Word
// addressing uses addr[AW+1:2]; the two low bits are ignored because the PC is
// word aligned. The write port, used to load a program before or during reset,
// writes one word per clock at a word index. The size is this design's choice.
module instr_mem #(
  parameter int DEPTH = 1024,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [31:0]   addr,    // byte address
  output logic [31:0]   instr,
  input  logic          we,      // program load
  input  logic [AW-1:0] waddr,   // word index
  input  logic [31:0]   wdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign instr = mem[addr[AW+1:2]];
endmodule
