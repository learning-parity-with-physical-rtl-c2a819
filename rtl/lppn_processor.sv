// lppn_processor: FPGA Learning-Parity-with-Physical-Noise (LPPN) processor.
//
// The processor returns noisy inner products <x,k> + e over GF(2) of a 512-bit
// secret k and challenge x, where the error e is not drawn from a random
// number generator but comes from sampling the inner-product net too early,
// while it still glitches. The sampling clock clk_del comes from a variable
// delay line (vdl) whose 6-bit control word is set by the error controller
// during calibration so that the error probability is close to 0.25. A second
// flip-flop clocked by the later clk_sk gives the correct result, used only
// during calibration. A voltage sensor measures the supply at every request;
// once calibrated, a change of more than THRSH sensor steps from the value
// latched at the end of calibration reinitialises the processor (rst_v),
// which drops locked and calibrates again.
//
// Blocks and connections follow the published processor architecture:
// inner_product, vdl, clk_skew_buf (clk -> clk_sk), voltage_sensor,
// fault_detector and err_control_fsm. The delay elements (vdl chain, clock
// buffer, sensor delay line, settling of the inner-product net) are
// behavioural models; everything else is synthesizable. rst_n, p_valid and
// the vdd_mv input that feeds the behavioural sensor model are this design's
// additions.
//
// Masking (SHARES > 1, not used by default): k is then the first key share,
// whose inner product is computed inexactly, and k_mask carries the other
// SHARES-1 shares, whose exact inner products (share_ip) are XORed onto the
// noisy bit. The secret is the XOR of all shares. Calibration counts the
// errors of the first share only, so the error rate is set as in the
// unmasked design. With SHARES = 1 k_mask is unused.
//
// Use: pulse enable for one cycle with x and k valid, at least every second
// cycle; for the sensor model, raise enable half a clock period before the
// sampling edge. The first 7 * 1024 requests calibrate (locked = 0); after
// that, p_valid marks the cycle in which p_out holds a new LPPN sample, the
// cycle that follows the one in which enable was sampled.
module lppn_processor
  import lppn_pkg::*;
#(
  parameter int unsigned N         = N_BITS,
  parameter bit          USE_DUMMY = 1'b1,
  parameter int unsigned DW        = DUMMY_W,
  parameter int unsigned NBATCH    = BATCH,
  parameter int unsigned NTARGET   = TARGET,
  parameter int unsigned THRSH     = 1,
  parameter int unsigned SHARES    = 1,
  // number of extra key shares carried by k_mask (at least 1 so the port exists)
  parameter int unsigned MW        = (SHARES > 1) ? SHARES - 1 : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic [N-1:0]      x,
  input  logic [N-1:0]      k,
  input  logic [MW*N-1:0]   k_mask,
  input  logic [DW-1:0]     dummy_in,
  input  logic [10:0]       vdd_mv,
  output logic              p_out,
  output logic              p_valid,
  output logic              locked,
  output logic [CNTL_W-1:0] ctrl_err,
  output logic              rst_v
);
  timeunit 1ps; timeprecision 1ps;

  logic       clk_del, clk_sk;
  logic       p_noisy;     // noisy inner product of the (first) key share
  logic       p_out_corr;
  logic       en0_out, en1_out;
  logic [7:0] vt_therm;
  logic [3:0] vt_sens;

  clk_skew_buf u_skew (
    .clk    (clk),
    .clk_sk (clk_sk)
  );

  vdl u_vdl (
    .clk     (clk),
    .cntl    (ctrl_err),
    .clk_del (clk_del)
  );

  inner_product #(.N(N), .USE_DUMMY(USE_DUMMY), .DUMMY_W(DW)) u_ip (
    .clk        (clk),
    .clk_del    (clk_del),
    .clk_sk     (clk_sk),
    .rst_n      (rst_n),
    .enable     (enable),
    .rst_v      (rst_v),
    .x          (x),
    .k          (k),
    .dummy_in   (dummy_in),
    .en0_out    (en0_out),
    .en1_out    (en1_out),
    .p_out      (p_noisy),
    .p_out_corr (p_out_corr)
  );

  // Masked configuration: exact inner products of the extra key shares are
  // XORed onto the noisy one; with SHARES = 1 p_out is the noisy output.
  if (SHARES > 1) begin : g_mask
    logic [SHARES-2:0] y_share;
    for (genvar i = 0; i < SHARES - 1; i++) begin : g_share
      share_ip #(.N(N)) u_share (
        .clk     (clk),
        .rst_n   (rst_n),
        .enable  (enable),
        .rst_v   (rst_v),
        .x       (x),
        .k_share (k_mask[i*N +: N]),
        .y       (y_share[i])
      );
    end
    assign p_out = p_noisy ^ (^y_share);
  end else begin : g_nomask
    assign p_out = p_noisy;
  end

  voltage_sensor u_sens (
    .clk      (clk),
    .rst_n    (rst_n),
    .enable   (enable),
    .vdd_mv   (vdd_mv),
    .vt_therm (vt_therm),
    .vt_sens  (vt_sens)
  );

  fault_detector #(.THRSH(THRSH)) u_fd (
    .clk     (clk),
    .rst_n   (rst_n),
    .locked  (locked),
    .meas    (en0_out),
    .vt_sens (vt_sens),
    .rst_v   (rst_v)
  );

  err_control_fsm #(.BATCH_LEN(NBATCH), .TARGET_ERR(NTARGET), .CW(CNTL_W)) u_ec (
    .clk        (clk),
    .rst_n      (rst_n),
    .enable     (enable),
    .rst_v      (rst_v),
    .p_out      (p_noisy),
    .p_out_corr (p_out_corr),
    .en0_out    (en0_out),
    .en1_out    (en1_out),
    .ctrl_err   (ctrl_err),
    .locked     (locked),
    .p_valid    (p_valid)
  );
endmodule
