// ip_parallel_stage: AND layer and parallel XOR tree of the LPPN inner product.
//
// The secret k and challenge x are multiplied in GF(2), a bitwise AND of all
// N bits in parallel, and the N products are then folded by LAYERS layers of
// two-input XOR gates (XOR1..XOR6 for the 512-bit prototype), leaving
// N >> LAYERS partial parities (8 for the prototype). This structure and these
// sizes follow the published architecture. Pairing adjacent bits in every
// layer is this design's choice, so that output s[i] is the parity of the
// products x[i*G +: G] & k[i*G +: G] with G = 2**LAYERS: s[7] holds the most
// significant 64 products and enters the serial chain first.
//
// Interface: purely combinational, x,k -> s. No clock, no latency.
module ip_parallel_stage #(
  parameter int unsigned N      = 512,
  parameter int unsigned LAYERS = 6
) (
  input  logic [N-1:0]           x,
  input  logic [N-1:0]           k,
  output logic [(N>>LAYERS)-1:0] s
);
  timeunit 1ps; timeprecision 1ps;

  // level[0] is the AND layer; level[l] for l >= 1 is the output of XOR layer l
  // (only its lowest N >> l bits are used).
  logic [N-1:0] level [LAYERS+1];

  assign level[0] = x & k;

  for (genvar l = 1; l <= LAYERS; l++) begin : g_layer
    for (genvar j = 0; j < (N >> l); j++) begin : g_xor
      assign level[l][j] = level[l-1][2*j] ^ level[l-1][2*j+1];
    end
    if ((N >> l) < N) begin : g_pad
      assign level[l][N-1:(N>>l)] = '0;
    end
  end

  assign s = level[LAYERS][(N>>LAYERS)-1:0];

  initial begin
    assert ((N >> LAYERS) << LAYERS == N)
      else $error("N must be a multiple of 2**LAYERS");
  end
endmodule
