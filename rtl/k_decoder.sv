// k_decoder: decodes the sum of characteristic numbers K12 = K1 + K2 into
// the one-hot power of two 2^K12 on the WIDTH-bit product grid, i.e. it
// "puts the leading one in the product". 'en' low forces the output to zero;
// the basic block uses that when one operand is zero. Combinational.
module k_decoder #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned KW    = 5
) (
  input  logic [KW-1:0]    k,
  input  logic             en,
  output logic [WIDTH-1:0] dout
);

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      dout[i] = en && (k == KW'(i));
    end
  end

endmodule
