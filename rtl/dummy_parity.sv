// dummy_parity: the data-independent dummy circuit of the LPPN processor.
//
// It computes the parity of a W-bit string with a balanced tree of LAYERS
// layers of two-input XOR gates (128 bits, 7 layers in the published design),
// so that its logic depth equals that of the AND layer plus the six-layer
// parallel XOR stage of the inner product. Its output bit d arrives at the
// serial XOR chain together with the eight partial parities and is XORed in
// twice there, so it adds glitches without changing the result. Where the W
// bits come from is not specified; here they are an input of the block.
//
// Interface: purely combinational, din -> d.
module dummy_parity #(
  parameter int unsigned W      = 128,
  parameter int unsigned LAYERS = 7
) (
  input  logic [W-1:0] din,
  output logic         d
);
  timeunit 1ps; timeprecision 1ps;

  logic [W-1:0] level [LAYERS+1];

  assign level[0] = din;

  for (genvar l = 1; l <= LAYERS; l++) begin : g_layer
    for (genvar j = 0; j < (W >> l); j++) begin : g_xor
      assign level[l][j] = level[l-1][2*j] ^ level[l-1][2*j+1];
    end
    assign level[l][W-1:(W>>l)] = '0;
  end

  assign d = level[LAYERS][0];

  initial begin
    assert (W == (1 << LAYERS)) else $error("W must equal 2**LAYERS");
  end
endmodule
