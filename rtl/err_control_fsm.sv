// err_control_fsm: error control and calibration state machine.
//
// Calibration: the processor is driven with random challenges, one
// evaluation per enable pulse. For each evaluation the controller XORs the
// inexact output p_out with the correct output p_out_corr and accumulates
// the errors in a 10-bit saturating counter. Calibration runs CNTL_W+1 = 7
// batches of BATCH_LEN = 1024 evaluations. CNTL starts at 0, so batch 0 measures
// the error rate at the shortest delay. At the end of each batch the error
// count is compared with TARGET_ERR = 256 (error probability 0.25) and CNTL is
// set by successive approximation, MSB first: the bit tried in the batch
// just ended is kept if the count is above TARGET_ERR (more delay is needed),
// and the next lower bit is set for the next batch. After the 7th batch the
// controller locks, and en1_out, the enable of the p_out_corr flip-flop, stays
// low from then on. This sequence follows the published error controller;
// the direction of the comparison ("keep the bit when count > TARGET_ERR") is the
// one that makes a later sampling clock reduce the error rate.
//
// Locked: every evaluation raises p_valid for one cycle, unless rst_v (fault
// detected) is high; rst_v reinitialises the controller (CNTL = 0, new
// calibration).
//
// Timing: enable is sampled on the rising edge of clk; it must be a
// one-cycle pulse followed by at least one low cycle (checked by an
// assertion). en0_out/en1_out are enable delayed by one register and are high
// for the cycle in which the delayed clocks sample P. The evaluation
// completes on the next edge, where the error is counted and, when locked,
// p_valid is set for one cycle. One LPPN sample therefore takes 2 clock
// cycles, and calibration takes 7 * 1024 evaluations.
module err_control_fsm
  import lppn_pkg::*;
#(
  parameter int unsigned BATCH_LEN  = 1024,
  parameter int unsigned TARGET_ERR = 256,
  parameter int unsigned CW     = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic          rst_v,
  input  logic          p_out,
  input  logic          p_out_corr,
  output logic          en0_out,
  output logic          en1_out,
  output logic [CW-1:0] ctrl_err,
  output logic          locked,
  output logic          p_valid
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned EW = $clog2(BATCH_LEN);          // 10-bit counters
  localparam int unsigned BW = $clog2(CW + 2);

  ctrl_state_e   state_q;
  logic [EW-1:0] eval_q;     // evaluations done in the current batch
  logic [EW-1:0] err_q;      // errors accumulated in the current batch
  logic [BW-1:0] batch_q;    // current batch, 0 .. CW
  logic [CW-1:0] cntl_q;

  logic          err;
  logic [EW:0]   err_sum;
  logic [EW-1:0] err_sat;
  logic          batch_end;
  logic [CW-1:0] cntl_next;

  always_comb begin
    err       = p_out ^ p_out_corr;
    err_sum   = {1'b0, err_q} + (EW+1)'(err);
    err_sat   = err_sum[EW] ? '1 : err_sum[EW-1:0];
    batch_end = (32'(eval_q) == BATCH_LEN - 1);
    cntl_next = cntl_q;
    // decide the bit tried during the batch that ends
    if (batch_q != 0) begin
      cntl_next[CW - 32'(batch_q)] = (32'(err_sat) > TARGET_ERR);
    end
    // try the next lower bit in the following batch
    if (32'(batch_q) < CW) begin
      cntl_next[CW - 1 - 32'(batch_q)] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= ST_CALIB;
      eval_q  <= '0;
      err_q   <= '0;
      batch_q <= '0;
      cntl_q  <= '0;
      en0_out <= 1'b0;
      en1_out <= 1'b0;
      p_valid <= 1'b0;
    end else if (rst_v) begin
      state_q <= ST_CALIB;
      eval_q  <= '0;
      err_q   <= '0;
      batch_q <= '0;
      cntl_q  <= '0;
      en0_out <= 1'b0;
      en1_out <= 1'b0;
      p_valid <= 1'b0;
    end else begin
      en0_out <= enable;
      en1_out <= enable && (state_q == ST_CALIB);
      p_valid <= en0_out && (state_q == ST_LOCKED);
      if (en0_out && state_q == ST_CALIB) begin
        if (batch_end) begin
          cntl_q  <= cntl_next;
          eval_q  <= '0;
          err_q   <= '0;
          batch_q <= batch_q + 1'b1;
          if (32'(batch_q) == CW) state_q <= ST_LOCKED;
        end else begin
          eval_q <= eval_q + 1'b1;
          err_q  <= err_sat;
        end
      end
    end
  end

  assign ctrl_err = cntl_q;
  assign locked   = (state_q == ST_LOCKED);

  // enable is a one-cycle request pulse
  a_enable_pulse : assert property (@(posedge clk) disable iff (!rst_n) enable |=> !enable)
    else $error("enable must be low in the cycle after a request");
  // the reference flip-flop is never enabled once locked
  a_corr_off : assert property (@(posedge clk) disable iff (!rst_n) locked |-> !en1_out || $past(!locked))
    else $error("p_out_corr sampled while locked");
endmodule
