// instr_buffer: buffer register file of a PE interface module.
//
// A first-in first-out store of DEPTH 32-bit PE and load instructions. While
// the data transfer unit is busy, instructions from the controller are
// written here instead of being issued; once the transfer ends they are read
// out in order, one per clock. Write and read may happen in the same cycle.
// inst_out shows the oldest entry (valid when empty is low). A write when
// full or a read when empty is refused and flagged by an assertion. DEPTH is
// this design's choice.
module instr_buffer #(
  parameter int DEPTH = 16,
  parameter int W     = 32,
  localparam int PW   = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         we,
  input  logic [W-1:0] instr,
  input  logic         re,
  output logic [W-1:0] inst_out,
  output logic         empty,
  output logic         full
);
  logic [W-1:0] mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [PW:0]   cnt;
  logic          do_w, do_r;

  assign empty = (cnt == '0);
  assign full  = (cnt == (PW+1)'(DEPTH));
  assign do_w  = we && !full;
  assign do_r  = re && !empty;

  always_ff @(posedge clk) begin
    if (rst) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (do_w) begin
        mem[wp] <= instr;
        wp      <= (wp == PW'(DEPTH-1)) ? '0 : wp + PW'(1);
      end
      if (do_r) rp <= (rp == PW'(DEPTH-1)) ? '0 : rp + PW'(1);
      cnt <= cnt + (PW+1)'(do_w) - (PW+1)'(do_r);
    end
  end

  assign inst_out = mem[rp];

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) we |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) re |-> !empty);
endmodule
