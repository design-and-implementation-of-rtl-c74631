// recursive_adder: accumulates the approximate product and its correction
// terms, P_result = P_approx(0) + C(1) + C(2) + ..., as they leave the
// basic block one per clock.
//
// A term tagged 'first' restarts the sum; any other valid term is added to
// the running sum. Every valid term updates 'p_approx', the current
// approximation P_approx(i), one clock later ('approx_valid' pulses). A term
// tagged 'last' also loads 'p_result' with the complete sum and pulses
// 'result_valid'; 'result_terms' then holds how many terms made up the
// product (the first approximation plus the correction terms).
//
// The adder is one ilm_adder and a register: one clock of latency. Reset
// (synchronous, active high) clears all state. The term count output is
// this design's addition.
module recursive_adder
  import ilm_pkg::*;
#(
  parameter int unsigned PW = 32,
  parameter int unsigned CW = 6
) (
  input  logic          clk,
  input  logic          reset,
  input  term_tag_t     in_tag,
  input  logic [PW-1:0] term,
  output logic          approx_valid,
  output logic [PW-1:0] p_approx,
  output logic          result_valid,
  output logic [PW-1:0] p_result,
  output logic [CW-1:0] result_terms
);

  logic [PW-1:0] acc_sum;
  logic          acc_co;
  logic [CW-1:0] count;
  logic [PW-1:0] sum_c;
  logic [CW-1:0] count_c;

  ilm_adder #(.WIDTH(PW)) u_add (.a(p_approx), .b(term), .s(acc_sum), .cout(acc_co));

  always_comb begin
    sum_c   = in_tag.first ? term : acc_sum;
    count_c = in_tag.first ? CW'(1) : count + CW'(1);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      approx_valid <= 1'b0;
      p_approx     <= '0;
      count        <= '0;
      result_valid <= 1'b0;
      p_result     <= '0;
      result_terms <= '0;
    end else begin
      approx_valid <= in_tag.valid;
      result_valid <= in_tag.valid & in_tag.last;
      if (in_tag.valid) begin
        p_approx <= sum_c;
        count    <= count_c;
        if (in_tag.last) begin
          p_result     <= sum_c;
          result_terms <= count_c;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!reset && in_tag.valid && !in_tag.first) assert (!acc_co) else $error("recursive_adder: sum overflow");
  end

endmodule
