// basic_block: four-stage pipelined basic block of the iterative
// logarithmic multiplier.
//
// For two operands N1, N2 with characteristic numbers K1, K2 (position of
// the leading '1') it computes the first approximation of their product
//
//   P = 2^(K1+K2) + (N1 - 2^K1) * 2^K2 + (N2 - 2^K2) * 2^K1
//
// whose error is exactly (N1 - 2^K1) * (N2 - 2^K2). In the modified
// multiplier the same block is re-used for every correction term by feeding
// the two residues N1 - 2^K1 and N2 - 2^K2 back as the next operands.
//
// Pipeline (one register at the end of each stage):
//   stage 1  two leading-one detectors with zero detectors and two encoders:
//            K1, K2 and the residues. The residues are available at the
//            stage-1 register output ('res1', 'res2', 'res_valid'), which is
//            where the feedback path takes them.
//   stage 2  K1 + K2 and the two barrel-shifted residues.
//   stage 3  decoder 2^(K1+K2), and the sum of the two shifted residues.
//   stage 4  sum of the two stage-3 values: P ('p', 'out_tag').
// A new operand pair can enter every clock; P leaves four clocks after its
// operands were presented. When either operand is zero, P is forced to zero
// using the detectors' zero flags.
//
// The 'in_first' flag is carried along in a tag. Its 'last' bit is generated
// here: a term is the last one of its product when either of its residues
// is zero, since no further correction is then needed.
//
// The stage split follows the document's pipelined basic block. The tag,
// the synchronous active-high reset and the forcing of P to zero for a zero
// operand are this design's choices.
module basic_block
  import ilm_pkg::*;
#(
  parameter int unsigned N  = 16,
  parameter int unsigned KW = kbits(N)
) (
  input  logic             clk,
  input  logic             reset,
  // operands
  input  logic             in_valid,
  input  logic             in_first,
  input  logic [N-1:0]     n1,
  input  logic [N-1:0]     n2,
  // residues at the stage-1 register
  output logic             res_valid,
  output logic [N-1:0]     res1,
  output logic [N-1:0]     res2,
  // approximate product / correction term at the stage-4 register
  output term_tag_t        out_tag,
  output logic [2*N-1:0]   p
);

  localparam int unsigned PW = 2 * N;
  localparam int unsigned SW = KW + 1;   // width of K1 + K2

  // ---------------- stage 1 ----------------
  logic [N-1:0]  oh1, oh2;
  logic          z1, z2;
  logic [KW-1:0] k1_c, k2_c;

  lod #(.WIDTH(N)) u_lod1 (.n(n1), .onehot(oh1), .zero(z1));
  lod #(.WIDTH(N)) u_lod2 (.n(n2), .onehot(oh2), .zero(z2));
  lod_encoder #(.WIDTH(N), .KW(KW)) u_enc1 (.onehot(oh1), .k(k1_c));
  lod_encoder #(.WIDTH(N), .KW(KW)) u_enc2 (.onehot(oh2), .k(k2_c));

  term_tag_t     s1_tag;
  logic [KW-1:0] s1_k1, s1_k2;
  logic [N-1:0]  s1_r1, s1_r2;
  logic          s1_zero;

  always_ff @(posedge clk) begin
    if (reset) begin
      s1_tag  <= '0;
      s1_k1   <= '0;
      s1_k2   <= '0;
      s1_r1   <= '0;
      s1_r2   <= '0;
      s1_zero <= 1'b0;
    end else begin
      s1_tag.valid <= in_valid;
      s1_tag.first <= in_first;
      s1_tag.last  <= ~|(n1 & ~oh1) | ~|(n2 & ~oh2);
      s1_k1        <= k1_c;
      s1_k2        <= k2_c;
      s1_r1        <= n1 & ~oh1;
      s1_r2        <= n2 & ~oh2;
      s1_zero      <= z1 | z2;
    end
  end

  assign res_valid = s1_tag.valid;
  assign res1      = s1_r1;
  assign res2      = s1_r2;

  // ---------------- stage 2 ----------------
  logic [SW-1:0] k12_c;
  logic [PW-1:0] sh1_c, sh2_c;

  assign k12_c = SW'(s1_k1) + SW'(s1_k2);

  // (N1 - 2^K1) * 2^K2 and (N2 - 2^K2) * 2^K1
  barrel_shifter #(.WIDTH(PW), .SW(KW)) u_bsh1 (.din(PW'(s1_r1)), .sh(s1_k2), .dout(sh1_c));
  barrel_shifter #(.WIDTH(PW), .SW(KW)) u_bsh2 (.din(PW'(s1_r2)), .sh(s1_k1), .dout(sh2_c));

  term_tag_t     s2_tag;
  logic [SW-1:0] s2_k12;
  logic [PW-1:0] s2_sh1, s2_sh2;
  logic          s2_zero;

  always_ff @(posedge clk) begin
    if (reset) begin
      s2_tag  <= '0;
      s2_k12  <= '0;
      s2_sh1  <= '0;
      s2_sh2  <= '0;
      s2_zero <= 1'b0;
    end else begin
      s2_tag  <= s1_tag;
      s2_k12  <= k12_c;
      s2_sh1  <= sh1_c;
      s2_sh2  <= sh2_c;
      s2_zero <= s1_zero;
    end
  end

  // ---------------- stage 3 ----------------
  logic [PW-1:0] dec_c, bsum_c;
  logic          bsum_co;

  k_decoder #(.WIDTH(PW), .KW(SW)) u_dec (.k(s2_k12), .en(~s2_zero), .dout(dec_c));
  ilm_adder #(.WIDTH(PW)) u_add_b (.a(s2_sh1), .b(s2_sh2), .s(bsum_c), .cout(bsum_co));

  term_tag_t     s3_tag;
  logic [PW-1:0] s3_d, s3_b;

  always_ff @(posedge clk) begin
    if (reset) begin
      s3_tag <= '0;
      s3_d   <= '0;
      s3_b   <= '0;
    end else begin
      s3_tag <= s2_tag;
      s3_d   <= dec_c;
      s3_b   <= s2_zero ? '0 : bsum_c;
    end
  end

  // ---------------- stage 4 ----------------
  logic [PW-1:0] p_c;
  logic          p_co;

  ilm_adder #(.WIDTH(PW)) u_add_p (.a(s3_d), .b(s3_b), .s(p_c), .cout(p_co));

  always_ff @(posedge clk) begin
    if (reset) begin
      out_tag <= '0;
      p       <= '0;
    end else begin
      out_tag <= s3_tag;
      p       <= p_c;
    end
  end

  // Neither sum can overflow the product width: both are bounded by N1*N2.
  always_ff @(posedge clk) begin
    if (!reset && s2_tag.valid) assert (!bsum_co) else $error("basic_block: shifted-residue sum overflow");
    if (!reset && s3_tag.valid) assert (!p_co) else $error("basic_block: product sum overflow");
  end

endmodule
