// tb_lod_encoder: applies every one-hot 16-bit vector (and zero) to the
// encoder and checks that it returns the index of the set bit.
module tb_lod_encoder;
  localparam int unsigned W = 16;
  logic [W-1:0] oh;
  logic [3:0] k;
  int checks = 0, failures = 0;

  lod_encoder #(.WIDTH(W), .KW(4)) dut (.onehot(oh), .k(k));

  initial begin
    #100_000;
    failures++;
    $display("tb_lod_encoder: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    oh = '0;
    #1;
    checks++;
    if (k !== 4'd0) failures++;
    for (int i = 0; i < W; i++) begin
      oh = W'(1) << i;
      #1;
      checks++;
      if (k !== 4'(i)) begin
        failures++;
        $display("tb_lod_encoder: onehot=%h k=%0d exp=%0d", oh, k, i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
