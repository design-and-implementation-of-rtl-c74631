// tb_k_decoder: every K12 value 0..31 with the enable high and low; the
// output must be 2^K12, or zero when disabled.
module tb_k_decoder;
  logic [4:0] k;
  logic en;
  logic [31:0] dout;
  int checks = 0, failures = 0;

  k_decoder #(.WIDTH(32), .KW(5)) dut (.k(k), .en(en), .dout(dout));

  initial begin
    #100_000;
    failures++;
    $display("tb_k_decoder: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int i = 0; i < 32; i++) begin
        k  = 5'(i);
        en = e[0];
        #1;
        checks++;
        if (dout !== (e == 1 ? (32'd1 << i) : 32'd0)) begin
          failures++;
          $display("tb_k_decoder: k=%0d en=%b dout=%h", k, en, dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
