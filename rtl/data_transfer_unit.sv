// data_transfer_unit: bulk mover from global memory to the PE local banks.
//
// A MOV in the controller's Decode stage pulses start with bank_index, count
// and initial_address. The unit then runs on its own while the controller
// continues: each cycle it reads one 128-bit word from global memory at the
// next sequential address and, one cycle later (the memory's read latency),
// presents that word with a single write enable to bank bank[2:0] of every
// PE. After each word it tests whether count-1 is still above zero and stops
// when it is not, so exactly count words are moved; count = 0 moves nothing.
// busy (controlT) is high from the cycle after start until the cycle in which
// the last word is written, inclusive; it holds PE and load instructions in
// the interface buffers. The per-word behaviour and the count test follow
// the published description; the read pipelining, the count = 0 rule and the
// use of only the low three bank_index bits (8 banks) are this design's.
module data_transfer_unit
  import cp_pkg::*;
#(
  parameter int AW = 16
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [3:0]    bank,
  input  logic [5:0]    count,
  input  logic [AW-1:0] addr,
  output logic          busy,
  // global memory read port
  output logic          gm_re,
  output logic [AW-1:0] gm_raddr,
  input  logic [DW-1:0] gm_rdata,
  // write to the selected bank of every PE
  output logic          wr_en,
  output logic [2:0]    wr_bank,
  output logic [DW-1:0] wr_data
);
  logic          running;
  logic [5:0]    remain;
  logic [AW-1:0] rptr;
  logic          rd_pend;   // a read was issued last cycle

  always_ff @(posedge clk) begin
    if (rst) begin
      running <= 1'b0;
      remain  <= '0;
      rptr    <= '0;
      wr_bank <= '0;
      rd_pend <= 1'b0;
    end else begin
      rd_pend <= gm_re;
      if (start && !busy) begin
        running <= (count != 6'd0);
        remain  <= count;
        rptr    <= addr;
        wr_bank <= bank[2:0];
      end else if (running) begin
        rptr    <= rptr + AW'(1);
        remain  <= remain - 6'd1;
        running <= (remain - 6'd1) > 6'd0;   // count-1 > 0: continue
      end
    end
  end

  assign gm_re    = running;
  assign gm_raddr = rptr;
  assign wr_en    = rd_pend;
  assign wr_data  = gm_rdata;
  assign busy     = running || rd_pend;

  a_start_idle: assert property (@(posedge clk) disable iff (rst) start |-> !busy);
endmodule
