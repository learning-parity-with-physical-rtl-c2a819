// vs_delay_line: supply-dependent delay line of the on-chip voltage sensor.
//
// Behavioural model, not synthesizable: on the FPGA this is a chain of
// LUTS = 93 LUTs used as buffers, whose propagation delay shrinks as the
// supply voltage rises. A 0->1 transition of enable travels down the chain;
// TAPS = 8 taps b[7:0] are taken at non-evenly spaced positions, as in the
// published sensor, so that each tap stands for roughly 100 mV.
//
// Delay model (an assumption): one LUT delays by K_PS_MV / (vdd_mv - VT_MV)
// picoseconds. The tap positions are chosen so that, with enable rising half
// a 13.56 MHz clock period (T_REF_PS) before the sampling edge, tap j is
// reached when the supply is at least 650 + 100*j mV:
//   pos[j] = round((650 + 100*j - VT_MV) * LUTS / (1350 - VT_MV)),
// i.e. 31, 40, 49, 58, 66, 75, 84, 93 for the default values. A falling
// enable clears all taps at once, which is a simplification.
//
// Interface: enable in, vdd_mv (the supply in mV, a simulation input) in, b[7:0] out.
module vs_delay_line #(
  parameter int unsigned LUTS     = 93,
  parameter int unsigned VT_MV    = 300,
  parameter int unsigned T_REF_PS = 36873
) (
  input  logic        enable,
  input  logic [10:0] vdd_mv,
  output logic [7:0]  b
);
  timeunit 1ps; timeprecision 1ps;

  // ps*mV constant that makes the last tap be reached at 1350 mV in T_REF_PS.
  localparam longint unsigned K_PS_MV =
    (longint'(1350 - VT_MV) * longint'(T_REF_PS)) / longint'(LUTS);

  function automatic int unsigned tap_pos(int unsigned j);
    return ((650 + 100 * j - VT_MV) * LUTS + (1350 - VT_MV) / 2) / (1350 - VT_MV);
  endfunction

  // supply above the threshold voltage, in mV (at least 1)
  function automatic longint unsigned vdd_over_vt();
    longint unsigned v = longint'(vdd_mv);
    return (v > longint'(VT_MV) + 1) ? v - longint'(VT_MV) : 1;
  endfunction

  time t_rise;   // time of the latest 0->1 transition of enable

  always @(posedge enable) t_rise = $time;

  for (genvar j = 0; j < 8; j++) begin : g_tap
    localparam int unsigned POS = tap_pos(j);
    logic reached;   // the latest rising edge of enable has reached this tap
    initial reached = 1'b0;
    always @(posedge enable) begin
      reached = 1'b0;
      // the edge reaches the tap after POS LUT delays at the current supply,
      // unless enable has risen again in the meantime
      fork
        begin
          automatic time t_start = $time;
          #(longint'(POS) * K_PS_MV / vdd_over_vt());
          if (t_rise == t_start) reached = 1'b1;
        end
      join_none
    end
    // a falling enable clears the tap at once
    assign b[j] = enable & reached;
  end
endmodule
