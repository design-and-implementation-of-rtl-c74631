// tb_lod: exhaustive self-checking test of the 16-bit leading-one detector.
// Every operand value is applied; the expected one-hot vector is found by
// scanning the bits from the top, and the zero flag by comparing with 0.
module tb_lod;
  localparam int unsigned W = 16;
  logic [W-1:0] n, onehot;
  logic zero;
  int checks = 0, failures = 0;

  lod #(.WIDTH(W)) dut (.n(n), .onehot(onehot), .zero(zero));

  initial begin
    #10_000_000;
    failures++;
    $display("tb_lod: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_oh;
    for (int v = 0; v < 2 ** W; v++) begin
      n = W'(v);
      #1;
      exp_oh = '0;
      for (int i = W - 1; i >= 0; i--) begin
        if (n[i]) begin
          exp_oh[i] = 1'b1;
          break;
        end
      end
      checks++;
      if (onehot !== exp_oh || zero !== (v == 0)) begin
        failures++;
        if (failures < 10) $display("tb_lod: n=%h onehot=%h exp=%h zero=%b", n, onehot, exp_oh, zero);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
