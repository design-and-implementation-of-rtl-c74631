// tb_ilm_error_table: measures the maximum relative error of the running
// approximation p_approx of modified_ilm after i correction terms, over
// dense and random 16-bit operand pairs streamed back to back, and prints
// the table. Expected bound after i correction terms: 2^-(2i+2), i.e.
// 25 %, 6.25 %, 1.56 %, 0.39 %, 0.098 %, 0.024 %. The final result must
// have zero error. Checks: every approximation is within its bound, every
// result is exact, and the worst error seen for i = 0..3 comes within a
// factor of two of its bound (dense all-ones operands drive it close).
module tb_ilm_error_table;
  logic clk = 1'b0, reset;
  logic in_valid, in_ready;
  logic [15:0] m1, m2;
  logic approx_valid, result_valid;
  logic [31:0] p_approx, p_result;
  logic [5:0] result_terms;
  int checks = 0, failures = 0;

  localparam int NUM = 20000;

  modified_ilm dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("tb_ilm_error_table: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [15:0] a, b; } pair_t;
  pair_t q[$];
  real max_err[16];
  int step = 0, n_done = 0;

  function automatic logic [15:0] dense();
    logic [15:0] v = 16'hFFFF;
    repeat ($urandom % 3) v[$urandom % 16] = 1'b0;
    return v >> ($urandom % 8);
  endfunction

  initial begin
    real bound;
    foreach (max_err[i]) max_err[i] = 0.0;
    in_valid = 1'b0;
    m1 = '0;
    m2 = '0;
    reset = 1'b1;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    for (int j = 0; j < NUM; j++) begin
      in_valid = 1'b1;
      m1 = (j % 2) ? dense() : 16'($urandom);
      m2 = (j % 2) ? dense() : 16'($urandom);
      do @(negedge clk); while (!in_ready);
      q.push_back('{a: m1, b: m2});
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    while (n_done < NUM) @(posedge clk);
    $display("correction terms | max relative error (%%) | bound (%%)");
    for (int i = 0; i < 6; i++) begin
      bound = 100.0 / real'(longint'(1) << (2 * i + 2));
      $display("  %2d             | %10.5f              | %8.5f", i, 100.0 * max_err[i], bound);
      checks++;
      if (100.0 * max_err[i] > bound) failures++;
      if (i < 4) begin
        checks++;
        if (100.0 * max_err[i] < bound / 2.0) begin
          failures++;
          $display("tb_ilm_error_table: worst case for %0d terms not approached", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    if (!reset && approx_valid && q.size() > 0) begin
      automatic real tru = real'(longint'(q[0].a) * longint'(q[0].b));
      automatic real e = (tru == 0.0) ? 0.0 : (tru - real'(p_approx)) / tru;
      if (step < 16 && e > max_err[step]) max_err[step] = e;
      checks++;
      if (e > 1.0 / real'(longint'(1) << (2 * step + 2)) || e < 0.0) begin
        failures++;
        if (failures < 10) $display("tb_ilm_error_table: %0d*%0d step %0d error %f", q[0].a, q[0].b, step, e);
      end
      step++;
    end
    if (!reset && result_valid && q.size() > 0) begin
      automatic pair_t p = q.pop_front();
      checks++;
      if (p_result !== 32'(longint'(p.a) * longint'(p.b))) failures++;
      step = 0;
      n_done++;
    end
  end
endmodule
