// tb_ilm_adder: corner and random 32-bit additions, sum and carry-out
// checked against 33-bit arithmetic in the testbench.
module tb_ilm_adder;
  logic [31:0] a, b, s;
  logic cout;
  int checks = 0, failures = 0;

  ilm_adder #(.WIDTH(32)) dut (.a(a), .b(b), .s(s), .cout(cout));

  initial begin
    #1_000_000;
    failures++;
    $display("tb_ilm_adder: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned ref_sum;
    for (int r = 0; r < 2000; r++) begin
      case (r)
        0: begin a = 32'hFFFF_FFFF; b = 32'd1; end
        1: begin a = 32'hFFFF_FFFF; b = 32'hFFFF_FFFF; end
        2: begin a = 32'd0; b = 32'd0; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      #1;
      ref_sum = longint'(a) + longint'(b);
      checks++;
      if (s !== ref_sum[31:0] || cout !== ref_sum[32]) begin
        failures++;
        if (failures < 10) $display("tb_ilm_adder: %h + %h = %b %h", a, b, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
