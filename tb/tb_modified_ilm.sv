// tb_modified_ilm: end-to-end test of the modified iterative logarithmic
// multiplier at its default size (16 x 16 bits).
//
// Operand pairs (fixed cases, then random values with zeros, powers of two
// and dense all-ones patterns mixed in) are offered with random gaps and
// held until accepted. The testbench's own model works from the identity
//   N1*N2 = P_approx(i) + R1(i)*R2(i),
// where R1(i), R2(i) are the operands with their i+1 leading ones removed.
// For every product it checks:
//   - p_result equals N1*N2 exactly;
//   - result_terms equals the number of '1' bits of the operand with fewer
//     of them (at least 1);
//   - the result arrives T+4 rising edges after the operands are taken,
//     counting the taking edge as the first (T = number of terms);
//   - each running approximation p_approx equals N1*N2 - R1(i)*R2(i) and
//     its relative error is within 2^-(2i+2) (25 %, 6.25 %, 1.56 %, ...);
//   - a new pair is refused while correction terms are still being issued.
// Mechanisms counted, each of which must occur: input stall, back-to-back
// acceptance right after a product's last term, zero operand, single-term
// product of non-zero operands, products needing more than seven terms,
// the 16-term worst case, and every approximation step i = 0..15.
module tb_modified_ilm;
  logic clk = 1'b0, reset;
  logic in_valid, in_ready;
  logic [15:0] m1, m2;
  logic approx_valid, result_valid;
  logic [31:0] p_approx, p_result;
  logic [5:0] result_terms;
  int checks = 0, failures = 0;
  int unsigned cycle = 0;

  localparam int NUM_RANDOM = 4000;

  modified_ilm dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("tb_modified_ilm: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [15:0] a, b;
    int unsigned t_acc;
  } job_t;

  job_t pending[$];
  int n_done = 0, n_sent = 0;
  int approx_idx = 0;
  // mechanism counters
  int c_stall = 0, c_b2b = 0, c_zero = 0, c_single = 0, c_long = 0, c_max = 0;
  int c_step[16];

  function automatic int popc(input logic [15:0] v);
    int c = 0;
    for (int i = 0; i < 16; i++) c += v[i];
    return c;
  endfunction

  function automatic logic [15:0] strip(input logic [15:0] v);
    for (int i = 15; i >= 0; i--) if (v[i]) return v & ~(16'd1 << i);
    return v;
  endfunction

  function automatic int terms_of(input logic [15:0] a, input logic [15:0] b);
    int t = (popc(a) < popc(b)) ? popc(a) : popc(b);
    return (t < 1) ? 1 : t;
  endfunction

  function automatic logic [15:0] pick();
    case ($urandom % 8)
      0: return 16'd0;
      1: return 16'd1 << ($urandom % 16);
      2: return 16'hFFFF;
      3: return 16'hFFFF ^ (16'd1 << ($urandom % 16));
      default: return 16'($urandom);
    endcase
  endfunction

  // ---------------- driver ----------------
  initial begin
    logic [15:0] fa[9] = '{16'd106, 16'd234, 16'd45, 16'hFFFF, 16'd0, 16'd5, 16'h8000, 16'd1, 16'hAAAA};
    logic [15:0] fb[9] = '{16'd42, 16'd198, 16'd25, 16'hFFFF, 16'd5, 16'd0, 16'h8000, 16'd1, 16'h5555};
    logic taken;
    in_valid = 1'b0;
    m1 = '0;
    m2 = '0;
    reset = 1'b1;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    for (int j = 0; j < 9 + NUM_RANDOM; j++) begin
      // random idle clocks before most pairs; none for some, to get back-to-back loads
      if (j >= 9 && ($urandom % 3) == 0) repeat ($urandom % 4) @(posedge clk);
      #1;
      in_valid = 1'b1;
      m1 = (j < 9) ? fa[j] : pick();
      m2 = (j < 9) ? fb[j] : pick();
      do begin
        @(negedge clk);
        taken = in_ready;
        if (!taken) c_stall++;
        if (taken && dut.res_valid) c_b2b++;
        @(posedge clk);
      end while (!taken);
      pending.push_back('{a: m1, b: m2, t_acc: cycle + 1});
      n_sent++;
      #1 in_valid = 1'b0;
      m1 = 16'($urandom);
      m2 = 16'($urandom);
    end
    // drain
    while (n_done < n_sent) @(posedge clk);
    repeat (5) @(posedge clk);
    checks++;
    if (c_stall == 0)  begin failures++; $display("tb_modified_ilm: no input stall seen"); end
    checks++;
    if (c_b2b == 0)    begin failures++; $display("tb_modified_ilm: no back-to-back load seen"); end
    checks++;
    if (c_zero == 0)   begin failures++; $display("tb_modified_ilm: no zero operand seen"); end
    checks++;
    if (c_single == 0) begin failures++; $display("tb_modified_ilm: no single-term product seen"); end
    checks++;
    if (c_long == 0)   begin failures++; $display("tb_modified_ilm: no product over 7 terms seen"); end
    checks++;
    if (c_max == 0)    begin failures++; $display("tb_modified_ilm: no 16-term product seen"); end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (c_step[i] == 0) begin failures++; $display("tb_modified_ilm: approximation step %0d never seen", i); end
    end
    $display("tb_modified_ilm: products=%0d stalls=%0d back_to_back=%0d zero=%0d single=%0d over7=%0d max16=%0d",
             n_done, c_stall, c_b2b, c_zero, c_single, c_long, c_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- monitor ----------------
  always @(negedge clk) begin
    if (!reset) begin
      if (approx_valid) begin
        if (pending.size() == 0) begin
          failures++;
          $display("tb_modified_ilm: approximation with no product pending");
        end else begin
          automatic logic [15:0] r1 = pending[0].a, r2 = pending[0].b;
          automatic longint unsigned tru = longint'(pending[0].a) * longint'(pending[0].b);
          automatic longint unsigned ex;
          for (int i = 0; i <= approx_idx; i++) begin
            r1 = strip(r1);
            r2 = strip(r2);
          end
          ex = (pending[0].a == 0 || pending[0].b == 0) ? 0 : tru - longint'(r1) * longint'(r2);
          checks++;
          if (p_approx !== 32'(ex)) begin
            failures++;
            if (failures < 10) $display("tb_modified_ilm: %0d*%0d step %0d p_approx=%0d exp=%0d",
                                         pending[0].a, pending[0].b, approx_idx, p_approx, ex);
          end
          // maximum relative error after i correction terms: 2^-(2i+2)
          checks++;
          if (tru != 0 && ((tru - longint'(p_approx)) << (2 * approx_idx + 2)) > tru) begin
            failures++;
            $display("tb_modified_ilm: %0d*%0d step %0d relative error above bound", pending[0].a, pending[0].b, approx_idx);
          end
          if (approx_idx < 16) c_step[approx_idx]++;
          approx_idx++;
        end
      end
      if (result_valid) begin
        if (pending.size() == 0) begin
          failures++;
          $display("tb_modified_ilm: result with no product pending");
        end else begin
          automatic job_t j = pending.pop_front();
          automatic int t = terms_of(j.a, j.b);
          checks++;
          if (p_result !== 32'(longint'(j.a) * longint'(j.b))) begin
            failures++;
            if (failures < 10) $display("tb_modified_ilm: %0d*%0d = %0d (got %0d)", j.a, j.b, j.a * j.b, p_result);
          end
          checks++;
          if (result_terms !== 6'(t) || approx_idx != t) begin
            failures++;
            if (failures < 10) $display("tb_modified_ilm: %h*%h terms=%0d approx=%0d exp=%0d", j.a, j.b, result_terms, approx_idx, t);
          end
          checks++;
          if (cycle - j.t_acc + 1 != t + 4) begin
            failures++;
            if (failures < 10) $display("tb_modified_ilm: %h*%h latency %0d exp %0d", j.a, j.b, cycle - j.t_acc + 1, t + 4);
          end
          if (j.a == 0 || j.b == 0) c_zero++;
          else if (t == 1) c_single++;
          if (t > 7) c_long++;
          if (t == 16) c_max++;
          approx_idx = 0;
          n_done++;
        end
      end
    end
  end

endmodule
