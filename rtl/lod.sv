// lod: leading-one detector with zero detector.
//
// For a WIDTH-bit operand n, 'onehot' has exactly one bit set, at the place
// of the most significant '1' of n (the characteristic number K of the
// logarithmic representation n = 2^K (1 + X)). 'zero' flags an all-zero
// operand; 'onehot' is then all zeros. Clearing the 'onehot' bit from n
// gives the residue n - 2^K used by the iterative multiplier.
//
// The leading one is found with a prefix-OR from the top: a bit is the
// leading one when it is set and no higher bit is set. Purely combinational.
// The function follows the multiplier's basic block; the prefix-OR structure
// is this design's own choice.
module lod #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] n,
  output logic [WIDTH-1:0] onehot,
  output logic             zero
);

  // seen[i]: some bit above position i is set
  logic [WIDTH-1:0] seen;

  always_comb begin
    seen[WIDTH-1] = 1'b0;
    for (int i = WIDTH - 2; i >= 0; i--) begin
      seen[i] = seen[i+1] | n[i+1];
    end
    onehot = n & ~seen;
    zero   = ~|n;
  end

endmodule
