// voltage_sensor: time-to-digital converter estimating the supply voltage.
//
// Contains the behavioural delay-line model (vs_delay_line), so the block as
// a whole is a behavioural model; its registers and encoder are
// synthesizable. As published, a 0->1 transition of enable is sent down a
// 93-LUT delay line, 8 taps are sampled by flip-flops on the reference clock
// and the thermometer code vt_therm is encoded into the 4-bit vt_sens. The
// higher the supply, the further the edge travels and the larger vt_sens.
// The flip-flops capture on the rising clk edge at which enable is high (the
// edge that also loads the inner-product inputs) and hold their value
// otherwise; this timing is this design's choice. vt_sens is valid from that
// edge until the next measurement.
//
// Interface: clk, enable, vdd_mv (supply seen by the model) in;
// vt_therm[7:0], vt_sens[3:0] out.
module voltage_sensor (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic [10:0] vdd_mv,
  output logic [7:0]  vt_therm,
  output logic [3:0]  vt_sens
);
  timeunit 1ps; timeprecision 1ps;

  logic [7:0] taps;

  vs_delay_line u_line (
    .enable (enable),
    .vdd_mv (vdd_mv),
    .b      (taps)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      vt_therm <= '0;
    else if (enable) vt_therm <= taps;
  end

  therm_encoder #(.TAPS(8)) u_enc (
    .therm (vt_therm),
    .bin   (vt_sens)
  );
endmodule
