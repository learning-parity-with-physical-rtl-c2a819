// vdl_tap_mux: 64:1 tap selector of the variable delay line.
//
// The 64 taps of the carry chain (4 per CARRY4 element, 16 elements) are
// selected by the 6-bit control word CNTL in four levels, as in the published
// delay line: a 4:1 multiplexer per carry element (one LUT6, CNTL[1:0]), a
// 2:1 level pairing neighbouring elements (MUXF7, CNTL[2]), a second 2:1
// level (MUXF8, CNTL[3]) and a final 4:1 multiplexer (LUT6, CNTL[5:4]).
// The tap selected is taps[cntl], tap 0 being the earliest.
//
// Interface: combinational, taps[63:0], cntl[5:0] -> clk_del.
module vdl_tap_mux (
  input  logic [63:0] taps,
  input  logic [5:0]  cntl,
  output logic        clk_del
);
  timeunit 1ps; timeprecision 1ps;

  logic [15:0] lut_mux;   // one 4:1 LUT6 multiplexer per CARRY4
  logic [7:0]  muxf7;
  logic [3:0]  muxf8;

  for (genvar c = 0; c < 16; c++) begin : g_lut
    assign lut_mux[c] = taps[4*c + 32'(cntl[1:0])];
  end
  for (genvar m = 0; m < 8; m++) begin : g_f7
    assign muxf7[m] = cntl[2] ? lut_mux[2*m+1] : lut_mux[2*m];
  end
  for (genvar m = 0; m < 4; m++) begin : g_f8
    assign muxf8[m] = cntl[3] ? muxf7[2*m+1] : muxf7[2*m];
  end
  assign clk_del = muxf8[cntl[5:4]];
endmodule
