// tb_recursive_adder: feeds random groups of 1..8 terms, one per clock with
// random idle clocks in between, tagged first/last as the basic block does.
// Checks that p_approx shows the running sum one clock after each term,
// that p_result/result_valid give the group's total one clock after its
// last term, and that result_terms counts the terms.
module tb_recursive_adder;
  import ilm_pkg::*;
  logic clk = 1'b0, reset;
  term_tag_t in_tag;
  logic [31:0] term, p_approx, p_result;
  logic approx_valid, result_valid;
  logic [5:0] result_terms;
  int checks = 0, failures = 0;

  recursive_adder #(.PW(32), .CW(6)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("tb_recursive_adder: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] run;
    int len;
    in_tag = '0;
    term   = '0;
    reset  = 1'b1;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    for (int g = 0; g < 300; g++) begin
      len = 1 + ($urandom % 8);
      run = '0;
      for (int t = 0; t < len; t++) begin
        in_tag.valid = 1'b1;
        in_tag.first = (t == 0);
        in_tag.last  = (t == len - 1);
        term = $urandom % 32'h0100_0000;
        run  = run + term;
        @(posedge clk);
        #1;
        checks++;
        if (!approx_valid || p_approx !== run) begin
          failures++;
          if (failures < 10) $display("tb_recursive_adder: g=%0d t=%0d p_approx=%h exp=%h", g, t, p_approx, run);
        end
        checks++;
        if (result_valid !== (t == len - 1)) begin
          failures++;
          if (failures < 10) $display("tb_recursive_adder: result_valid=%b at t=%0d of %0d", result_valid, t, len);
        end
        if (t == len - 1) begin
          checks++;
          if (p_result !== run || result_terms !== 6'(len)) begin
            failures++;
            if (failures < 10) $display("tb_recursive_adder: p_result=%h exp=%h terms=%0d exp=%0d", p_result, run, result_terms, len);
          end
        end
      end
      in_tag = '0;
      term   = $urandom;
      repeat ($urandom % 3) begin
        @(posedge clk);
        #1;
        checks++;
        if (approx_valid || result_valid) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
