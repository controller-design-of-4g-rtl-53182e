// local_mem_bank: one local memory bank of a PE.
//
// DEPTH words of W bits with one write port (W_addr, Data, WE) fed by the
// data transfer unit and one read port (R_addr, RE, Read_data) used by load
// instructions. The read is synchronous: Read_data holds the word one cycle
// after RE and keeps it until the next read. Port names follow the published
// interface diagram; the depth is this design's choice.
module local_mem_bank #(
  parameter int DEPTH = 256,
  parameter int W     = 128,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
