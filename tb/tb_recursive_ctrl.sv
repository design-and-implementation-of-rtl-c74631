// tb_recursive_ctrl: all 16 combinations of the controller inputs. Expected
// behaviour: iterate (select residues, refuse operands, issue a non-first
// term) exactly when the fed-back residues are valid and both non-zero;
// otherwise select the operands and issue a first term when one is offered.
module tb_recursive_ctrl;
  logic in_valid, in_ready, res_valid, res_zero1, res_zero2, sel, issue_valid, issue_first;
  int checks = 0, failures = 0;

  recursive_ctrl dut (.*);

  initial begin
    #100_000;
    failures++;
    $display("tb_recursive_ctrl: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic it;
    for (int v = 0; v < 16; v++) begin
      {in_valid, res_valid, res_zero1, res_zero2} = 4'(v);
      #1;
      it = res_valid && !res_zero1 && !res_zero2;
      checks++;
      if (sel !== !it || in_ready !== !it || issue_valid !== (it || in_valid) || issue_first !== !it) begin
        failures++;
        $display("tb_recursive_ctrl: in=%b%b%b%b -> sel=%b rdy=%b iv=%b if=%b", in_valid, res_valid,
                 res_zero1, res_zero2, sel, in_ready, issue_valid, issue_first);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
