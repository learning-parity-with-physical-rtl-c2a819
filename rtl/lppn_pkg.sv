// lppn_pkg: constants and types shared by the LPPN processor.
//
// The sizes are those of the FPGA prototype: a 512-bit secret and challenge,
// a parallel XOR stage that leaves 8 partial parities, a 6-bit delay control
// word (64 delay taps), calibration batches of 1024 evaluations compared with
// a target of 256 errors (error probability 0.25), and a 128-bit dummy parity
// circuit. The encoding of the calibration state is this design's own choice.
package lppn_pkg;
  timeunit 1ps; timeprecision 1ps;

  parameter int unsigned N_BITS    = 512;   // secret / challenge width
  parameter int unsigned CNTL_W    = 6;     // VDL control word width
  parameter int unsigned BATCH     = 1024;  // evaluations per calibration batch
  parameter int unsigned TARGET    = 256;   // error count for Pr[e=1] = 0.25
  parameter int unsigned DUMMY_W   = 128;   // dummy parity circuit input width

  // Calibration / operation state of the error controller.
  typedef enum logic [1:0] {
    ST_CALIB  = 2'd0,   // running the successive-approximation batches
    ST_LOCKED = 2'd1    // calibrated: producing LPPN samples
  } ctrl_state_e;
endpackage
