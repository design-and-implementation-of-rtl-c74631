// ilm_adder: WIDTH-bit binary adder with carry-out.
//
// Used twice in the basic block (sum of the two shifted residues, then
// adding the decoded leading one) and once in the recursive adder that
// accumulates the correction terms. The carry-out is never set in the
// multiplier, because every partial sum is bounded by the true product,
// which fits in 2*N bits; it is brought out for checking. Combinational.
module ilm_adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  always_comb {cout, s} = {1'b0, a} + {1'b0, b};

endmodule
