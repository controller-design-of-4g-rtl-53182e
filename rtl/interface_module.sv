// interface_module: the interface between the data transfer unit, the
// controller and one PE.
//
// It owns the PE's eight local memory banks, each with a write address
// generate unit (advanced by every word the data transfer unit writes into
// that bank) and a read address generate unit (advanced by every load that
// reads it), so both sides stream through a bank sequentially.
//
// PE and load instructions arrive from the controller. While a transfer is
// running (xfer_busy, controlT) they are written into the instruction buffer;
// they also go there while the buffer still holds older instructions, so
// order is kept. Once the transfer is over the buffer releases one
// instruction per clock to the load decoder. With no transfer and an empty
// buffer an instruction goes straight to the load decoder. A load reads its
// banks at the clock edge; one cycle later ld_we marks which register files
// of the PE take ld_data at entry ld_entry. A PE instruction appears on
// pe_valid/pe_instr in that same later cycle. in_ready is low when the
// buffer is full.
//
// The buffering rule, the sequential address generation and the four load
// widths follow the published design; the one-cycle output registering and
// the stall through in_ready are this design's choices.
module interface_module
  import cp_pkg::*;
#(
  parameter int BANK_DEPTH = 256,
  parameter int BUF_DEPTH  = 16,
  localparam int BAW = $clog2(BANK_DEPTH)
) (
  input  logic                      clk,
  input  logic                      rst,
  // from the controller
  input  logic                      in_valid,
  input  logic [ILEN-1:0]           in_instr,
  output logic                      in_ready,
  // from the data transfer unit
  input  logic                      xfer_busy,
  input  logic                      dt_we,
  input  logic [2:0]                dt_bank,
  input  logic [DW-1:0]             dt_data,
  // to the PE decoder
  output logic                      pe_valid,
  output logic [ILEN-1:0]           pe_instr,
  // to the PE register files
  output logic [NBANK-1:0]          ld_we,
  output logic [3:0]                ld_entry,
  output logic [NBANK-1:0][DW-1:0]  ld_data,
  output logic                      buffered   // an instruction entered the buffer
);
  // ---------------- instruction buffer ----------------
  logic            buf_we, buf_re, buf_empty, buf_full;
  logic [ILEN-1:0] buf_out;

  assign buf_we   = in_valid && (xfer_busy || !buf_empty);
  assign buf_re   = !xfer_busy && !buf_empty;
  assign in_ready = !buf_full;
  assign buffered = buf_we;

  instr_buffer #(.DEPTH(BUF_DEPTH), .W(ILEN)) u_buf (
    .clk, .rst, .we(buf_we), .instr(in_instr), .re(buf_re),
    .inst_out(buf_out), .empty(buf_empty), .full(buf_full)
  );

  logic            cur_valid;
  logic [ILEN-1:0] cur_instr;
  assign cur_valid = buf_re || (in_valid && !xfer_busy && buf_empty);
  assign cur_instr = buf_re ? buf_out : in_instr;

  // ---------------- load decoder ----------------
  logic             ld, pe_now;
  width_e           width;
  logic [NBANK-1:0] re;
  logic [3:0]       entry;
  load_decoder u_ldec (
    .valid(cur_valid), .instr(cur_instr), .ld, .pe_valid(pe_now), .width, .re, .entry
  );

  // ---------------- banks and address generators ----------------
  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    logic           bwe;
    logic [BAW-1:0] waddr, raddr;
    assign bwe = dt_we && (dt_bank == 3'(b));
    bank_addr_gen #(.AW(BAW)) u_wag (.clk, .rst, .inc(bwe),   .addr(waddr));
    bank_addr_gen #(.AW(BAW)) u_rag (.clk, .rst, .inc(re[b]), .addr(raddr));
    local_mem_bank #(.DEPTH(BANK_DEPTH), .W(DW)) u_mem (
      .clk, .we(bwe), .waddr, .wdata(dt_data), .re(re[b]), .raddr, .rdata(ld_data[b])
    );
  end

  // ---------------- outputs, one cycle after decode ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      pe_valid <= 1'b0;
      pe_instr <= '0;
      ld_we    <= '0;
      ld_entry <= '0;
    end else begin
      pe_valid <= pe_now;
      pe_instr <= cur_instr;
      ld_we    <= re;
      ld_entry <= entry;
    end
  end

  a_no_push_full: assert property (@(posedge clk) disable iff (rst) in_valid |-> in_ready);
endmodule
