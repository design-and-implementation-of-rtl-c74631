// tb_barrel_shifter: random 32-bit values shifted by every amount 0..15,
// compared with the '<<' operator.
module tb_barrel_shifter;
  logic [31:0] din, dout;
  logic [3:0] sh;
  int checks = 0, failures = 0;

  barrel_shifter #(.WIDTH(32), .SW(4)) dut (.din(din), .sh(sh), .dout(dout));

  initial begin
    #1_000_000;
    failures++;
    $display("tb_barrel_shifter: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 200; r++) begin
      for (int s = 0; s < 16; s++) begin
        din = (r == 0) ? 32'hFFFF_FFFF : $urandom;
        sh  = 4'(s);
        #1;
        checks++;
        if (dout !== (din << s)) begin
          failures++;
          if (failures < 10) $display("tb_barrel_shifter: din=%h sh=%0d dout=%h", din, sh, dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
