// bank_addr_gen: write or read address generate unit of one local bank.
//
// The PE algorithms stream their data, so bank addresses are produced
// sequentially: addr starts at 0 after reset and advances by one, wrapping
// at 2**AW, in each cycle that inc is high (one write, or one read, of that
// bank). The current address is used in the same cycle.
module bank_addr_gen #(
  parameter int AW = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          inc,
  output logic [AW-1:0] addr
);
  always_ff @(posedge clk) begin
    if (rst)      addr <= '0;
    else if (inc) addr <= addr + AW'(1);
  end
endmodule
