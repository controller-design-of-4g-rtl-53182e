// pc_logic: next-PC selection of the Fetch stage.
//
// Two 2-way multiplexers, a register and an adder. Multiplexer A chooses
// between pcplus4 and the branch target pcbE under bE (giving pcbr);
// multiplexer B then chooses between pcbr and the jump target pcjD under
// jumpD (giving pcnext), which the PC register takes at the rising edge. The
// mux order and the signal names follow the published PC logic. The enable
// that holds the PC during a stall, and the synchronous reset to address 0,
// are this design's additions.
module pc_logic #(
  parameter int XLEN = 32
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            en,
  input  logic            be,
  input  logic [XLEN-1:0] pcbe,
  input  logic            jumpd,
  input  logic [XLEN-1:0] pcjd,
  output logic [XLEN-1:0] pc,
  output logic [XLEN-1:0] pcplus4
);
  logic [XLEN-1:0] pcbr, pcnext;

  assign pcplus4 = pc + XLEN'(4);
  assign pcbr    = be    ? pcbe : pcplus4;   // mux A
  assign pcnext  = jumpd ? pcjd : pcbr;      // mux B

  always_ff @(posedge clk) begin
    if (rst)     pc <= '0;
    else if (en) pc <= pcnext;
  end
endmodule
