// comm_proc_top: controller and data transfer front end of a variable-width
// SIMD processor for 4G baseband and video work.
//
// One scalar controller runs the program. MOV instructions start the data
// transfer unit, which streams 128-bit words from global memory into one
// local bank of every PE while the controller keeps going. PE and load
// instructions leave the controller's Decode stage for the NUM_PE interface
// modules; each holds them in its buffer while a transfer runs, then decodes
// the loads (filling the PE's register files from its banks at 1, 2, 4 or 8
// banks per load) and passes the PE instructions to the PE decoder. All PEs
// see the same instruction stream and the same transfer data.
//
// The PE lanes themselves (SIMD decoder, ALU/multiplier/adder/loader lanes,
// swizzle and adder tree) are outside this RTL: their connections are the
// pe_valid/pe_instr outputs and the register-file read ports rf_ra/rf_rb/
// rf_rc -> rf_a/rf_b/rf_c. The host loads the program through imem_* and the
// global memory through gm_*. The overall organisation (one controller, one
// data transfer module, four PEs each with buffer and interface) follows the
// published architecture.
module comm_proc_top
  import cp_pkg::*;
#(
  parameter int NUM_PE     = 4,
  parameter int IMEM_DEPTH = 1024,
  parameter int GM_AW      = 16,
  parameter int BANK_DEPTH = 256,
  parameter int BUF_DEPTH  = 16,
  localparam int IAW = $clog2(IMEM_DEPTH)
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic                                imem_we,
  input  logic [IAW-1:0]                      imem_waddr,
  input  logic [31:0]                         imem_wdata,
  input  logic                                gm_we,
  input  logic [GM_AW-1:0]                    gm_waddr,
  input  logic [DW-1:0]                       gm_wdata,
  output logic [NUM_PE-1:0]                   pe_valid,
  output logic [NUM_PE-1:0][ILEN-1:0]         pe_instr,
  input  logic [NUM_PE-1:0][3:0]              rf_ra,
  input  logic [NUM_PE-1:0][3:0]              rf_rb,
  input  logic [NUM_PE-1:0][3:0]              rf_rc,
  output logic [NUM_PE-1:0][LANES-1:0][LANE_W-1:0] rf_a,
  output logic [NUM_PE-1:0][LANES-1:0][LANE_W-1:0] rf_b,
  output logic [NUM_PE-1:0][LANES-1:0][LANE_W-1:0] rf_c,
  // observation
  input  logic [4:0]                          dbg_raddr,
  output logic [XLEN-1:0]                     dbg_rdata,
  output logic [XLEN-1:0]                     pc,
  output logic                                dt_busy,
  output logic                                stall,
  output logic                                flush_b,
  output logic                                flush_j,
  output logic                                fwd,
  output logic                                dt_wr,
  output logic [NUM_PE-1:0]                   buffered,
  output logic [NUM_PE-1:0][NBANK-1:0]        ld_we
);
  logic            dt_start;
  logic [3:0]      dt_bank;
  logic [5:0]      dt_count;
  logic [15:0]     dt_addr;
  logic            ctl_valid, ctl_ready;
  logic [ILEN-1:0] ctl_instr;
  logic [NUM_PE-1:0] pe_ready;

  controller #(.IMEM_DEPTH(IMEM_DEPTH)) u_ctl (
    .clk, .rst, .imem_we, .imem_waddr, .imem_wdata,
    .dt_start, .dt_bank, .dt_count, .dt_addr, .dt_busy,
    .pe_out_valid(ctl_valid), .pe_out_instr(ctl_instr), .pe_out_ready(ctl_ready),
    .dbg_raddr, .dbg_rdata, .pc, .stall, .flush_b, .flush_j, .fwd
  );
  assign ctl_ready = &pe_ready;

  logic             gm_re;
  logic [GM_AW-1:0] gm_raddr;
  logic [DW-1:0]    gm_rdata;
  global_memory #(.AW(GM_AW), .W(DW)) u_gm (
    .clk, .we(gm_we), .waddr(gm_waddr), .wdata(gm_wdata),
    .re(gm_re), .raddr(gm_raddr), .rdata(gm_rdata)
  );

  logic [2:0]    wr_bank;
  logic [DW-1:0] wr_data;
  data_transfer_unit #(.AW(GM_AW)) u_dtu (
    .clk, .rst, .start(dt_start), .bank(dt_bank), .count(dt_count),
    .addr(dt_addr[GM_AW-1:0]), .busy(dt_busy),
    .gm_re, .gm_raddr, .gm_rdata, .wr_en(dt_wr), .wr_bank, .wr_data
  );

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    logic [3:0]                  ld_entry;
    logic [NBANK-1:0][DW-1:0]    ld_data;
    interface_module #(.BANK_DEPTH(BANK_DEPTH), .BUF_DEPTH(BUF_DEPTH)) u_if (
      .clk, .rst, .in_valid(ctl_valid), .in_instr(ctl_instr), .in_ready(pe_ready[p]),
      .xfer_busy(dt_busy), .dt_we(dt_wr), .dt_bank(wr_bank), .dt_data(wr_data),
      .pe_valid(pe_valid[p]), .pe_instr(pe_instr[p]),
      .ld_we(ld_we[p]), .ld_entry, .ld_data, .buffered(buffered[p])
    );
    pe_regfile u_rf (
      .clk, .we(ld_we[p]), .entry(ld_entry), .wdata(ld_data),
      .ra(rf_ra[p]), .rb(rf_rb[p]), .rc(rf_rc[p]),
      .a(rf_a[p]), .b(rf_b[p]), .c(rf_c[p])
    );
  end
endmodule
