// modified_ilm: modified iterative logarithmic multiplier (N x N unsigned,
// exact 2N-bit product) built from one pipelined basic block that is used
// recursively.
//
// Idea: writing each operand as N = 2^K + R, where 2^K is its leading '1'
// and R the residue, gives
//   N1*N2 = [2^(K1+K2) + R1*2^K2 + R2*2^K1] + R1*R2.
// The bracket needs only leading-one detection, shifts and additions; the
// remaining error R1*R2 is again a product, of the residues, and is
// attacked the same way. After as many rounds as the operand with fewer
// '1' bits has, one residue is zero and the sum of all terms is exact.
// Instead of a chain of basic blocks, one per correction term, this design
// has a single basic block whose residues are fed back through two select
// logic blocks, and a recursive adder that sums the terms.
//
// Datapath:
//   select_logic x2 -> basic_block (4 pipeline stages) -> recursive_adder
//                  ^---- residues (stage-1 register) ----'
//   recursive_ctrl drives the select lines and the input handshake.
//
// Interface and timing (synchronous, active-high reset):
//   - m1/m2 are taken when in_valid and in_ready are both high. in_ready is
//     low while the previous product still needs correction terms.
//   - One term enters the basic block per clock. P_approx(0) leaves the
//     basic block 4 clocks after the operands are taken; the running
//     approximation p_approx (approx_valid) follows one clock later and
//     improves by one correction term every clock.
//   - A product made of T terms (T = number of '1' bits of the operand with
//     fewer of them, at least 1) is on p_result with result_valid T + 4
//     clocks after its operands were taken; result_terms gives T.
//   - Operands are accepted every T clocks, back to back.
// The algorithm, the single recursively used basic block, the select logic
// and the recursive adder follow the document; the handshake, the tag that
// marks first and last terms and the extra output register of the adder are
// this design's choices.
module modified_ilm
  import ilm_pkg::*;
#(
  parameter int unsigned N  = ilm_pkg::N_BITS,
  parameter int unsigned CW = kbits(N) + 2
) (
  input  logic           clk,
  input  logic           reset,
  // operand input
  input  logic           in_valid,
  output logic           in_ready,
  input  logic [N-1:0]   m1,
  input  logic [N-1:0]   m2,
  // running approximation P_approx(i)
  output logic           approx_valid,
  output logic [2*N-1:0] p_approx,
  // exact product
  output logic           result_valid,
  output logic [2*N-1:0] p_result,
  output logic [CW-1:0]  result_terms
);

  logic          sel;
  logic          res_valid;
  logic [N-1:0]  res1, res2;
  logic          res_zero1, res_zero2;
  logic [N-1:0]  n1, n2;
  logic          issue_valid, issue_first;
  term_tag_t     bb_tag;
  logic [2*N-1:0] bb_p;

  select_logic #(.N(N)) u_sel1 (.sel(sel), .m(m1), .res(res1), .n(n1), .res_zero(res_zero1));
  select_logic #(.N(N)) u_sel2 (.sel(sel), .m(m2), .res(res2), .n(n2), .res_zero(res_zero2));

  recursive_ctrl u_ctrl (
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .res_valid  (res_valid),
    .res_zero1  (res_zero1),
    .res_zero2  (res_zero2),
    .sel        (sel),
    .issue_valid(issue_valid),
    .issue_first(issue_first)
  );

  basic_block #(.N(N)) u_bb (
    .clk      (clk),
    .reset    (reset),
    .in_valid (issue_valid),
    .in_first (issue_first),
    .n1       (n1),
    .n2       (n2),
    .res_valid(res_valid),
    .res1     (res1),
    .res2     (res2),
    .out_tag  (bb_tag),
    .p        (bb_p)
  );

  recursive_adder #(.PW(2 * N), .CW(CW)) u_radd (
    .clk         (clk),
    .reset       (reset),
    .in_tag      (bb_tag),
    .term        (bb_p),
    .approx_valid(approx_valid),
    .p_approx    (p_approx),
    .result_valid(result_valid),
    .p_result    (p_result),
    .result_terms(result_terms)
  );

endmodule
