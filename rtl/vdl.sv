// vdl: fully digital variable delay line producing the sampling clock clk_del.
//
// Behavioural model for the delay elements, synthesizable selector: the
// delays of the LUT buffers and carry elements are modelled with transport
// delays, while the 64:1 tap selector is the synthesizable vdl_tap_mux.
// Structure as published: a fixed pre-delay of PRE_LUTS LUTs configured as
// buffers (about 6 ns, compensating the parallel XOR stage), then a chain of
// 16 CARRY4 elements whose 64 carry outputs are taps about TAP_PS = 30 ps
// apart (tuning range 0 to about 2 ns), then the tap selector. The delay from
// clk to clk_del is PRE_LUTS*PRE_LUT_PS + (cntl+1)*TAP_PS; the delay of the
// selector itself is not modelled. The per-LUT delay is an assumption that
// reproduces the published ~6 ns total.
//
// Interface: clk in, cntl[5:0] (the CNTL word of the error controller), clk_del out.
module vdl #(
  parameter int unsigned PRE_LUTS   = 9,
  parameter int unsigned PRE_LUT_PS = 667,
  parameter int unsigned TAP_PS     = 30
) (
  input  logic       clk,
  input  logic [5:0] cntl,
  output logic       clk_del
);
  timeunit 1ps; timeprecision 1ps;

  logic [PRE_LUTS:0] pre;    // pre[0] = clk, pre[PRE_LUTS] = end of pre-delay
  logic [63:0]       taps;   // CO outputs of the 16 CARRY4 elements

  assign pre[0] = clk;
  for (genvar i = 1; i <= PRE_LUTS; i++) begin : g_pre
    assign #(PRE_LUT_PS) pre[i] = pre[i-1];
  end

  assign #(TAP_PS) taps[0] = pre[PRE_LUTS];
  for (genvar t = 1; t < 64; t++) begin : g_carry
    assign #(TAP_PS) taps[t] = taps[t-1];
  end

  vdl_tap_mux u_mux (
    .taps    (taps),
    .cntl    (cntl),
    .clk_del (clk_del)
  );
endmodule
