// global_memory: global data memory feeding the data transfer unit.
//
// 2**AW words of W bits. The host side writes one word per clock; the data
// transfer unit reads one word per clock with a synchronous read: rdata holds
// the word addressed by raddr in the cycle after re. Size and ports are this
// design's choice: AW defaults to 16 so that the whole range of the 16-bit
// initial_address field of MOV is backed by memory.
module global_memory #(
  parameter int AW = 16,
  parameter int W  = 128
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);
  logic [W-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
