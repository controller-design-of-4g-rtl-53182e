// addr_gen_unit: jump and branch target generation in the Decode stage.
//
// extimmD is shifted left by 2 (sl2immD); S1 picks extimmD (1) or sl2immD (0)
// as simmD, which an adder sums with pcD into dptaddrD. S2 picks dptaddrD (0)
// or the register value srcaD (1, for JLINK). S3 steers the chosen address,
// pcjorbD, to the jump output pcjD (1) or the branch output pcbD (0); the
// output not chosen is driven to zero. Combinational; structure, names and
// mux input numbering follow the published address generation unit.
module addr_gen_unit #(
  parameter int XLEN = 32
) (
  input  logic [XLEN-1:0] extimm,
  input  logic [XLEN-1:0] pcd,
  input  logic [XLEN-1:0] srca,
  input  logic            s1,
  input  logic            s2,
  input  logic            s3,
  output logic [XLEN-1:0] pcj,
  output logic [XLEN-1:0] pcb
);
  logic [XLEN-1:0] sl2imm, simm, dptaddr, pcjorb;

  assign sl2imm  = extimm << 2;
  assign simm    = s1 ? extimm : sl2imm;
  assign dptaddr = pcd + simm;
  assign pcjorb  = s2 ? srca : dptaddr;
  assign pcj     = s3 ? pcjorb : '0;
  assign pcb     = s3 ? '0 : pcjorb;
endmodule
