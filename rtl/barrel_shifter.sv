// barrel_shifter: logical left shift of a WIDTH-bit value by 'sh' places.
//
// Built as log2 stages, stage j shifting by 2^j when bit j of 'sh' is set,
// the classic barrel-shifter arrangement. Bits shifted out at the top are
// dropped; zeros enter at the bottom. In the multiplier it forms the
// shifted residues (N1 - 2^K1) * 2^K2 and (N2 - 2^K2) * 2^K1 on the
// 32-bit product grid. Combinational.
module barrel_shifter #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned SW    = 4
) (
  input  logic [WIDTH-1:0] din,
  input  logic [SW-1:0]    sh,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] stage [SW+1];

  always_comb begin
    stage[0] = din;
    for (int j = 0; j < SW; j++) begin
      stage[j+1] = sh[j] ? (stage[j] << (2 ** j)) : stage[j];
    end
    dout = stage[SW];
  end

endmodule
