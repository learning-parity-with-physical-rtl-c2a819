// therm_encoder: thermometer-to-binary encoder of the voltage sensor.
//
// Converts the 8-bit thermometer code of the delay-line taps into a 4-bit
// value (0..8). The published sensor uses "a simple encoder" without giving
// it; this one counts the ones, so a single bubble in the code changes the
// result by one step only.
//
// Interface: combinational, therm[TAPS-1:0] -> bin[3:0].
module therm_encoder #(
  parameter int unsigned TAPS = 8
) (
  input  logic [TAPS-1:0] therm,
  output logic [3:0]      bin
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    bin = '0;
    for (int unsigned i = 0; i < TAPS; i++) begin
      bin = bin + 4'(therm[i]);
    end
  end
endmodule
