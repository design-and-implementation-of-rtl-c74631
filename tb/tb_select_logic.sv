// tb_select_logic: random operands and residues with both select values;
// checks the selected output and the residue-zero status.
module tb_select_logic;
  logic sel, res_zero;
  logic [15:0] m, res, n;
  int checks = 0, failures = 0;

  select_logic #(.N(16)) dut (.sel(sel), .m(m), .res(res), .n(n), .res_zero(res_zero));

  initial begin
    #1_000_000;
    failures++;
    $display("tb_select_logic: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 1000; r++) begin
      sel = r[0];
      m   = 16'($urandom);
      res = (r % 7 == 0) ? 16'd0 : (r % 7 == 1) ? 16'(r % 2 + 1) : 16'($urandom);
      #1;
      checks++;
      if (n !== (sel ? m : res) || res_zero !== (res == 16'd0)) begin
        failures++;
        if (failures < 10) $display("tb_select_logic: sel=%b m=%h res=%h n=%h z=%b", sel, m, res, n, res_zero);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
