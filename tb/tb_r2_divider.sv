// tb_r2_divider: radix-2 array divider at 8 bits (all 65536 operand
// pairs), 16 bits and 32 bits (random and corner operands).
// For every division it checks the exact identity
//     A * 2^N = 2 * D * quotient + R_final          (units 2^-N)
// the remainder bound |R_final| < 2D, and |A/D - Q| < 2^-(N-1), with
// A = 2^N + a_frac and D = 2^N + d_frac computed here. It also counts
// negative quotient digits in the 32-bit array, which must occur.
module tb_r2_divider;
  logic [7:0]  a8, d8;    logic [8:0]  q8;  logic [10:0] rp8, rn8;
  logic [15:0] a16, d16;  logic [16:0] q16; logic [18:0] rp16, rn16;
  logic [31:0] a32, d32;  logic [32:0] q32; logic [34:0] rp32, rn32;
  int checks = 0, failures = 0, neg_digits = 0;

  r2_divider #(.N(8))  dut8  (.a_frac(a8),  .d_frac(d8),  .quotient(q8),  .rem_pos(rp8),  .rem_neg(rn8));
  r2_divider #(.N(16)) dut16 (.a_frac(a16), .d_frac(d16), .quotient(q16), .rem_pos(rp16), .rem_neg(rn16));
  r2_divider #(.N(32)) dut32 (.a_frac(a32), .d_frac(d32), .quotient(q32), .rem_pos(rp32), .rem_neg(rn32));

  task automatic check(int n, logic [63:0] af, logic [63:0] df, logic [63:0] q,
                       logic [63:0] rp, logic [63:0] rn);
    logic signed [159:0] a, d, r, lhs, rhs, err;
    a = (160'sd1 <<< n) + $signed({96'b0, af});
    d = (160'sd1 <<< n) + $signed({96'b0, df});
    r = $signed({96'b0, rp}) - $signed({96'b0, rn});
    lhs = a <<< n;
    rhs = 2 * d * $signed({96'b0, q}) + r;
    err = (a <<< (n - 1)) - d * $signed({96'b0, q});
    checks++;
    if (lhs != rhs || r >= 2 * d || r <= -2 * d || err >= d || err <= -d) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d a=%h d=%h q=%h r=%0d", n, af, df, q, r);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {a8, d8} = 16'(i);
      #1;
      check(8, 64'(a8), 64'(d8), 64'(q8), 64'(rp8), 64'(rn8));
    end
    for (int i = 0; i < 3000; i++) begin
      a16 = 16'($urandom); d16 = 16'($urandom);
      a32 = $urandom;      d32 = $urandom;
      case (i)
        0: begin a32 = '0; d32 = '0; a16 = '0; d16 = '0; end
        1: begin a32 = '1; d32 = '0; a16 = '1; d16 = '0; end
        2: begin a32 = '0; d32 = '1; a16 = '0; d16 = '1; end
        3: begin a32 = '1; d32 = '1; a16 = '1; d16 = '1; end
        default: ;
      endcase
      #1;
      check(16, 64'(a16), 64'(d16), 64'(q16), 64'(rp16), 64'(rn16));
      check(32, 64'(a32), 64'(d32), 64'(q32), 64'(rp32), 64'(rn32));
      if (dut32.qn != 0) neg_digits++;
    end
    checks++;
    if (neg_digits == 0) begin failures++; $display("FAIL no negative quotient digit seen"); end
    $display("divisions with negative quotient digits: %0d", neg_digits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
