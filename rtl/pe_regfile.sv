// pe_regfile: the eight register files of one PE.
//
// Each PE lane owns a 16-entry x 16-bit register file with read ports A, B
// and C. Eight lanes make one 128-bit register-file row, so register file g
// (g = 0..7) holds lanes 8g..8g+7 and is filled from local bank g by load
// instructions: when we[g] is high, row entry of register file g takes
// wdata[g] at the clock edge (lane 8g+k gets bits 16k+15..16k). The three
// read ports take one entry index each, common to all lanes (SIMD), and give
// every lane its 16-bit value combinationally. The sizes follow the published
// PE diagram; the mapping of lanes to register files is this design's
// reading of it.
module pe_regfile
  import cp_pkg::*;
#(
  parameter int NGRP  = 8,
  parameter int NENT  = 16,
  localparam int GL   = LANES / NGRP,   // lanes per register file
  localparam int EW   = $clog2(NENT)
) (
  input  logic                          clk,
  input  logic [NGRP-1:0]               we,
  input  logic [EW-1:0]                 entry,
  input  logic [NGRP-1:0][GL*LANE_W-1:0] wdata,
  input  logic [EW-1:0]                 ra,
  input  logic [EW-1:0]                 rb,
  input  logic [EW-1:0]                 rc,
  output logic [NGRP*GL-1:0][LANE_W-1:0] a,
  output logic [NGRP*GL-1:0][LANE_W-1:0] b,
  output logic [NGRP*GL-1:0][LANE_W-1:0] c
);
  logic [GL-1:0][LANE_W-1:0] rf [NGRP][NENT];

  always_ff @(posedge clk)
    for (int g = 0; g < NGRP; g++)
      if (we[g]) rf[g][entry] <= wdata[g];

  always_comb
    for (int g = 0; g < NGRP; g++)
      for (int k = 0; k < GL; k++) begin
        a[g*GL+k] = rf[g][ra][k];
        b[g*GL+k] = rf[g][rb][k];
        c[g*GL+k] = rf[g][rc][k];
      end
endmodule
