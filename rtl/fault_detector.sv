// fault_detector: detects a change of the supply voltage after calibration.
//
// When the error controller raises locked (end of calibration), the register
// L latches the current sensor value vt_sens as the reference. From then on,
// in every cycle that follows a new measurement (meas = 1), the absolute
// difference |vt_sens - L| is compared with THRSH and rst_v is raised if it
// is larger; rst_v reinitialises the inner product and the error controller,
// which drops locked and restarts calibration. The reaction therefore comes in
// the cycle after the measurement edge. The structure (L, subtraction,
// absolute value, threshold) follows the published processor; THRSH = 1
// sensor step corresponds to the published 100 mV threshold. Gating with meas
// and the one-cycle delay of the reference latch are this design's choices.
//
// Interface: clk, rst_n, locked, meas, vt_sens[3:0] in; rst_v out (combinational).
module fault_detector #(
  parameter int unsigned THRSH = 1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       locked,
  input  logic       meas,
  input  logic [3:0] vt_sens,
  output logic       rst_v
);
  timeunit 1ps; timeprecision 1ps;

  logic [3:0] ref_q;      // the register L
  logic       locked_d;
  logic [4:0] diff;       // two's complement vt_sens - L
  logic [3:0] abs_diff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_q    <= '0;
      locked_d <= 1'b0;
    end else begin
      locked_d <= locked;
      if (locked && !locked_d) ref_q <= vt_sens;
    end
  end

  always_comb begin
    diff     = {1'b0, vt_sens} - {1'b0, ref_q};
    abs_diff = diff[4] ? 4'(-diff) : diff[3:0];
    rst_v    = locked && locked_d && meas && (32'(abs_diff) > THRSH);
  end
endmodule
