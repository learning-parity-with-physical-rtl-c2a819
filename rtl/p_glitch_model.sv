// p_glitch_model: behavioural model of the settling of the inner-product net.
//
// Behavioural model, not synthesizable: in the FPGA this is nothing but the
// LUT and routing delay of the AND layer, the parallel XOR stage and the
// serial XOR chain, which a zero-delay simulation does not have. The model
// gives the zero-delay parity p_in the timing that the delayed sampling clock
// relies on, so that the calibration loop can be simulated:
//   * after a clock edge that loads new inputs (launch = 1), p_out keeps its
//     previous value for T_PAR_PS while the parallel stage settles;
//   * for the next T_WIN_PS the serial chain glitches: every STEP_PS p_out is
//     redrawn, wrong with a probability that falls linearly from 1/2 at the
//     start of the window to 0 at its end;
//   * then p_out equals p_in until the next launch.
// After an edge without launch, p_out follows p_in once the same time has
// passed. The window values are this model's own assumptions, chosen around
// the published ~6 ns fixed delay and ~2 ns tuning range of the delay line;
// the linear fall of the error probability is equally an assumption. The
// random draws come from a xorshift32 generator seeded by SEED.
module p_glitch_model #(
  parameter int unsigned T_PAR_PS = 5800,
  parameter int unsigned T_WIN_PS = 2400,
  parameter int unsigned STEP_PS  = 30,
  parameter logic [31:0] SEED     = 32'h1234_5678
) (
  input  logic clk,
  input  logic launch,
  input  logic p_in,
  output logic p_out
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned NSTEP = T_WIN_PS / STEP_PS;

  logic [31:0] rnd;   // xorshift32 state: the model's own random source

  function automatic logic [31:0] xorshift32(logic [31:0] v);
    v ^= v << 13;
    v ^= v >> 17;
    v ^= v << 5;
    return v;
  endfunction

  initial begin
    p_out = 1'b0;
    rnd   = SEED;
  end

  always @(posedge clk) begin
    if (launch) begin
      #(T_PAR_PS + STEP_PS / 2);
      for (int unsigned i = 0; i < NSTEP; i++) begin
        // Pr[wrong] = (NSTEP - i) / (2 * NSTEP)
        rnd   = xorshift32(rnd);
        p_out = p_in ^ ((rnd % (2 * NSTEP)) < (NSTEP - i));
        #(STEP_PS);
      end
      p_out = p_in;
    end else begin
      #(T_PAR_PS + T_WIN_PS);
      p_out = p_in;
    end
  end
endmodule
