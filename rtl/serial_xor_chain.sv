// serial_xor_chain: serial XOR stage of the LPPN inner product.
//
// The 8 partial parities s[7:0] from the parallel stage are folded by a chain
// of 7 two-input XOR gates: s[7] ^ s[6] first, then s[5], ..., s[0] last, so
// the most significant partial sums travel through the longest path. The
// unbalanced paths are what produce the glitches on P that the delayed
// sampling clock captures. With USE_DUMMY set, the dummy bit d is XORed before
// the first gate and after the last one (9 gates), which cancels its value
// but spreads its glitches over the whole chain. The chain order and the two
// dummy insertion points follow the published serial stage; the gate-by-gate
// chain is kept explicit so that synthesis sees the same structure.
//
// Interface: purely combinational, {s, d} -> p.
module serial_xor_chain #(
  parameter int unsigned M         = 8,
  parameter bit          USE_DUMMY = 1'b1
) (
  input  logic [M-1:0] s,
  input  logic         d,
  output logic         p
);
  timeunit 1ps; timeprecision 1ps;

  // chain[i] is the output of the i-th serial gate.
  logic [M-1:0] chain;
  logic         head;

  assign head     = USE_DUMMY ? (d ^ s[M-1]) : s[M-1];
  assign chain[0] = head;
  for (genvar i = 1; i < M; i++) begin : g_chain
    assign chain[i] = chain[i-1] ^ s[M-1-i];
  end

  assign p = USE_DUMMY ? (chain[M-1] ^ d) : chain[M-1];
endmodule
