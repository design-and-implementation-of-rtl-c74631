// recursive_ctrl: the recursive logic that decides, each clock, whether the
// single basic block takes a new operand pair or the residues of the term it
// has just started.
//
// The residues of the term in the basic block's first pipeline register are
// valid when 'res_valid' is high. If they are valid and neither is zero
// (select-logic status outputs 'res_zero1', 'res_zero2' low), another
// correction term is needed: the select lines go low, a term tagged
// "not first" is issued, and new operands are refused ('in_ready' low).
// Otherwise the select lines go high and a new operand pair, if offered
// ('in_valid'), is issued as the first term of a new product. Because the
// decision only looks at the first pipeline register, a product whose last
// correction term has just been issued is followed by the next product's
// first term in the very next clock.
//
// Combinational. The valid/ready handshake on the operand input is this
// design's choice; the document only says the next operands may be loaded
// once the status shows a zero residue.
module recursive_ctrl (
  input  logic in_valid,
  output logic in_ready,
  input  logic res_valid,
  input  logic res_zero1,
  input  logic res_zero2,
  output logic sel,
  output logic issue_valid,
  output logic issue_first
);

  logic iterate;

  always_comb begin
    iterate     = res_valid & ~res_zero1 & ~res_zero2;
    sel         = ~iterate;
    in_ready    = ~iterate;
    issue_valid = iterate | in_valid;
    issue_first = ~iterate;
  end

endmodule
