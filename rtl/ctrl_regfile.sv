// ctrl_regfile: register file of the controller datapath.
//
// 32 registers of 32 bits: r0 always reads zero and ignores writes, r1..r30
// are general purpose and r31 holds the return address written by JLINK.
// Two combinational read ports serve the Decode stage; the single write port
// is written at the rising clock edge by the instruction in the Execute
// stage. A read of the register being written in the same cycle returns the
// old value, which is why the controller forwards Execute results to Decode.
module ctrl_regfile #(
  parameter int XLEN = 32
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [4:0]      ra1,
  input  logic [4:0]      ra2,
  output logic [XLEN-1:0] rd1,
  output logic [XLEN-1:0] rd2,
  input  logic            we,
  input  logic [4:0]      wa,
  input  logic [XLEN-1:0] wd,
  input  logic [4:0]      dbg_ra,   // third read port for observation
  output logic [XLEN-1:0] dbg_rd
);
  logic [XLEN-1:0] regs [32];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  assign rd1    = (ra1 == 5'd0) ? '0 : regs[ra1];
  assign rd2    = (ra2 == 5'd0) ? '0 : regs[ra2];
  assign dbg_rd = (dbg_ra == 5'd0) ? '0 : regs[dbg_ra];
endmodule
