// share_ip: exact inner product of the challenge with one extra key share.
//
// Used only in the masked configuration of the processor (SHARES > 1). The
// secret is split as k = k_1 ^ k_2 ^ ... ^ k_d; the noisy inner product is
// computed on k_1 only, and every other share contributes its exact inner
// product <x, k_i>, so that the XOR of all of them equals <x,k> plus the
// noise of the first share. An adversary filtering on the noisy output then
// sees only the leakage of the ephemeral value <x, k_1>, which weakens attacks
// that exploit output-dependent error rates. The masked combination follows
// the masking scheme proposed for LPPN; the way it is wired here (one
// registered exact inner product per share, XORed onto p_out) is this
// design's own. Providing fresh shares is left to the user of the processor.
//
// Timing: x and the share are registered on the clk edge where enable is
// high (the same edge that loads the noisy inner product); y is the
// combinational parity of the registered values, valid from that edge on.
// rst_v clears the registers, like those of the noisy inner product.
module share_ip #(
  parameter int unsigned N = 512
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enable,
  input  logic         rst_v,
  input  logic [N-1:0] x,
  input  logic [N-1:0] k_share,
  output logic         y
);
  timeunit 1ps; timeprecision 1ps;

  logic [N-1:0] x_q, k_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      k_q <= '0;
    end else if (rst_v) begin
      x_q <= '0;
      k_q <= '0;
    end else if (enable) begin
      x_q <= x;
      k_q <= k_share;
    end
  end

  assign y = ^(x_q & k_q);
endmodule
