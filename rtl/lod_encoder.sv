// lod_encoder: encodes the one-hot leading-one vector of the leading-one
// detector into the characteristic number K (the bit position of the
// leading '1').
//
// Each output bit of K is the OR of the one-hot bits whose index has that
// bit set, so the encoder is a plain OR network with no priority logic; it
// relies on the input having at most one bit set. An all-zero input gives
// K = 0 (the zero detector of the leading-one detector flags that case).
// Combinational. The multiplier's basic block names an encoder after each
// detector; the OR-network form is this design's choice.
module lod_encoder #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned KW    = ilm_pkg::kbits(WIDTH)
) (
  input  logic [WIDTH-1:0] onehot,
  output logic [KW-1:0]    k
);

  always_comb begin
    k = '0;
    for (int i = 0; i < WIDTH; i++) begin
      if (onehot[i]) k = k | KW'(i);
    end
  end

  // The input must be one-hot or zero.
  always_comb assert ($onehot0(onehot)) else $error("lod_encoder: input is not one-hot");

endmodule
