// inner_product: the inexact inner-product (epsilon-PIP) block of the LPPN processor.
//
// On a clk edge with enable high, the 512-bit secret k and challenge x are
// registered. Their GF(2) inner product is computed by a fully parallel AND
// layer and six-layer XOR tree (ip_parallel_stage) that leaves 8 partial
// parities, followed by a serial chain of XOR gates (serial_xor_chain). With
// USE_DUMMY, a 128-bit dummy parity tree (dummy_parity) of the same depth
// feeds a bit that is XORed into the first and the last serial gate. The
// result P is sampled by two flip-flops in parallel: P_out on clk_del, the
// variable-delay clock, early enough to catch P while it still glitches, and
// P_out^corr on clk_sk, late enough to always see the settled value. Their
// enables en0_out and en1_out come from the error controller. This follows
// the published block. p_glitch_model is a behavioural stand-in for the
// propagation delay of the net (a wire in synthesis). rst_v clears the input
// registers when a fault is detected; rst_n is this design's own reset.
//
// Timing: x and k are loaded on the clk edge with enable; P_out is captured at
// the clk_del edge and P_out^corr at the clk_sk edge in the same clock period.
module inner_product #(
  parameter int unsigned N         = 512,
  parameter bit          USE_DUMMY = 1'b1,
  parameter int unsigned DUMMY_W   = 128
) (
  input  logic               clk,
  input  logic               clk_del,
  input  logic               clk_sk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic               rst_v,
  input  logic [N-1:0]       x,
  input  logic [N-1:0]       k,
  input  logic [DUMMY_W-1:0] dummy_in,
  input  logic               en0_out,
  input  logic               en1_out,
  output logic               p_out,
  output logic               p_out_corr
);
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned LAYERS = 6;
  localparam int unsigned M      = N >> LAYERS;   // 8 partial parities

  logic [N-1:0]       x_q, k_q;
  logic [DUMMY_W-1:0] dummy_q;
  logic [M-1:0]       s;
  logic               d;
  logic               p_ideal;   // zero-delay parity
  logic               p;         // parity with modelled timing

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q     <= '0;
      k_q     <= '0;
      dummy_q <= '0;
    end else if (rst_v) begin
      x_q     <= '0;
      k_q     <= '0;
      dummy_q <= '0;
    end else if (enable) begin
      x_q     <= x;
      k_q     <= k;
      dummy_q <= dummy_in;
    end
  end

  ip_parallel_stage #(.N(N), .LAYERS(LAYERS)) u_par (
    .x (x_q),
    .k (k_q),
    .s (s)
  );

  dummy_parity #(.W(DUMMY_W), .LAYERS($clog2(DUMMY_W))) u_dummy (
    .din (dummy_q),
    .d   (d)
  );

  serial_xor_chain #(.M(M), .USE_DUMMY(USE_DUMMY)) u_ser (
    .s (s),
    .d (d),
    .p (p_ideal)
  );

  p_glitch_model u_timing (
    .clk    (clk),
    .launch (enable),
    .p_in   (p_ideal),
    .p_out  (p)
  );

  always_ff @(posedge clk_del) begin
    if (en0_out) p_out <= p;
  end

  always_ff @(posedge clk_sk) begin
    if (en1_out) p_out_corr <= p;
  end
endmodule
