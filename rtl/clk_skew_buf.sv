// clk_skew_buf: clock buffer producing the skewed clock clk_sk.
//
// Behavioural model, not synthesizable: on the FPGA this is a clock buffer
// and its routing. clk_sk is the system clock delayed by T_SK_PS, chosen
// later than every tap of the variable delay line and later than the settling
// of the inner-product net, so that the flip-flop it clocks always captures
// the correct inner product. The published design only requires that clk_sk
// be later than clk_del; the value of T_SK_PS is an assumption.
module clk_skew_buf #(
  parameter int unsigned T_SK_PS = 12000
) (
  input  logic clk,
  output logic clk_sk
);
  timeunit 1ps; timeprecision 1ps;

  assign #(T_SK_PS) clk_sk = clk;
endmodule
