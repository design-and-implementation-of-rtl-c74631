// select_logic: operand selector in front of one leading-one detector of
// the basic block.
//
// With 'sel' high it passes the new multiplicand 'm'; with 'sel' low it
// passes the residue 'res' fed back from the basic block (the operand with
// its leading '1' removed), so the same basic block computes the next
// correction term. 'res_zero' is the status output: it is high when the
// fed-back residue is zero, meaning that no further correction is needed
// and the next operands may be loaded. Two instances are used, one per
// operand. Combinational.
//
// Ports, select polarity (high loads new operands) and the status follow the
// document's select logic block; the status being taken from the residue
// input is this design's reading of it.
module select_logic #(
  parameter int unsigned N = 16
) (
  input  logic         sel,
  input  logic [N-1:0] m,
  input  logic [N-1:0] res,
  output logic [N-1:0] n,
  output logic         res_zero
);

  always_comb begin
    n        = sel ? m : res;
    res_zero = (res == '0);
  end

endmodule
