// tb_basic_block: streams random operand pairs (with zeros, powers of two
// and all-ones mixed in) into the basic block, one per clock with random
// gaps. A reference model in the testbench computes
//   P = 2^(K1+K2) + (N1-2^K1)*2^K2 + (N2-2^K2)*2^K1   (0 for a zero operand)
// from the operands by integer arithmetic, and the residues N - 2^K. Checks
// the residues one clock after the operands, P exactly four clocks after,
// and the first/last tags, including that P + R1*R2 equals N1*N2.
module tb_basic_block;
  import ilm_pkg::*;
  logic clk = 1'b0, reset;
  logic in_valid, in_first;
  logic [15:0] n1, n2, res1, res2;
  logic res_valid;
  term_tag_t out_tag;
  logic [31:0] p;
  int checks = 0, failures = 0;

  basic_block #(.N(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("tb_basic_block: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int msb(input logic [15:0] v);
    for (int i = 15; i >= 0; i--) if (v[i]) return i;
    return -1;
  endfunction

  typedef struct {
    logic        valid;
    logic        first;
    logic [15:0] a, b;
  } stim_t;

  stim_t hist[$];

  function automatic logic [15:0] pick();
    case ($urandom % 6)
      0: return 16'd0;
      1: return 16'd1 << ($urandom % 16);
      2: return 16'hFFFF;
      default: return 16'($urandom);
    endcase
  endfunction

  initial begin
    stim_t s, s1, s4;
    longint unsigned exp_p, r1, r2;
    int k1, k2;
    in_valid = 1'b0;
    in_first = 1'b0;
    n1 = '0;
    n2 = '0;
    reset = 1'b1;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    for (int c = 0; c < 20000; c++) begin
      s.valid = ($urandom % 5) != 0;
      s.first = $urandom % 2;
      s.a = pick();
      s.b = pick();
      in_valid = s.valid;
      in_first = s.first;
      n1 = s.a;
      n2 = s.b;
      hist.push_front(s);
      if (hist.size() > 4) void'(hist.pop_back());
      @(posedge clk);
      #1;
      // residues of the pair presented one clock ago
      s1 = hist[0];
      k1 = msb(s1.a);
      k2 = msb(s1.b);
      r1 = (k1 < 0) ? 0 : s1.a - (longint'(1) << k1);
      r2 = (k2 < 0) ? 0 : s1.b - (longint'(1) << k2);
      checks++;
      if (res_valid !== s1.valid || (s1.valid && (res1 !== 16'(r1) || res2 !== 16'(r2)))) begin
        failures++;
        if (failures < 10) $display("tb_basic_block: residues of %h,%h = %h,%h", s1.a, s1.b, res1, res2);
      end
      // product of the pair presented four clocks ago
      if (hist.size() == 4) begin
        s4 = hist[3];
        k1 = msb(s4.a);
        k2 = msb(s4.b);
        if (k1 < 0 || k2 < 0) begin
          exp_p = 0;
          r1 = 0;
          r2 = 0;
        end else begin
          r1 = s4.a - (longint'(1) << k1);
          r2 = s4.b - (longint'(1) << k2);
          exp_p = (longint'(1) << (k1 + k2)) + (r1 << k2) + (r2 << k1);
        end
        checks++;
        if (out_tag.valid !== s4.valid) begin
          failures++;
          if (failures < 10) $display("tb_basic_block: out valid %b exp %b", out_tag.valid, s4.valid);
        end
        if (s4.valid) begin
          checks++;
          if (p !== 32'(exp_p) || out_tag.first !== s4.first || out_tag.last !== (r1 == 0 || r2 == 0)) begin
            failures++;
            if (failures < 10) $display("tb_basic_block: %h*%h p=%h exp=%h tag=%b", s4.a, s4.b, p, exp_p, out_tag);
          end
          checks++;
          if (longint'(p) + r1 * r2 != longint'(s4.a) * longint'(s4.b)) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
