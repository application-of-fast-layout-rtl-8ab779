// tb_r2s_divider: scaled radix-2 array divider at 8 bits (all operand
// pairs), 16 and 32 bits (random and corner operands).
// With K = 3/4 when d_1 = 1 (else 1), KA = 4K*A and Y = 4K*D in units
// 2^-(N+2), every division must satisfy
//     KA * 2^N = 2 * Y * quotient + R_final ,  |R_final| < 2 * 2^(N+2)
// and |A/D - Q| < 2^-(N-1). Both scaling cases and the "-0" digit code
// must occur.
module tb_r2s_divider;
  logic [7:0]  a8, d8;    logic [8:0]  q8;  logic [10:0] rp8, rn8;
  logic [15:0] a16, d16;  logic [16:0] q16; logic [18:0] rp16, rn16;
  logic [31:0] a32, d32;  logic [32:0] q32; logic [34:0] rp32, rn32;
  int checks = 0, failures = 0, scaled = 0, negzero = 0;

  r2s_divider #(.N(8))  dut8  (.a_frac(a8),  .d_frac(d8),  .quotient(q8),  .rem_pos(rp8),  .rem_neg(rn8));
  r2s_divider #(.N(16)) dut16 (.a_frac(a16), .d_frac(d16), .quotient(q16), .rem_pos(rp16), .rem_neg(rn16));
  r2s_divider #(.N(32)) dut32 (.a_frac(a32), .d_frac(d32), .quotient(q32), .rem_pos(rp32), .rem_neg(rn32));

  task automatic check(int n, logic [63:0] af, logic [63:0] df, logic [63:0] q,
                       logic [63:0] rp, logic [63:0] rn);
    logic signed [159:0] a, d, ka, y, r, err;
    int k4;
    k4 = df[n-1] ? 3 : 4;
    a = (160'sd1 <<< n) + $signed({96'b0, af});
    d = (160'sd1 <<< n) + $signed({96'b0, df});
    ka = a * k4;
    y = d * k4;
    r = $signed({96'b0, rp}) - $signed({96'b0, rn});
    err = (a <<< (n - 1)) - d * $signed({96'b0, q});
    checks++;
    if ((ka <<< n) != 2 * y * $signed({96'b0, q}) + r || r >= (160'sd2 <<< (n + 2))
        || r <= -(160'sd2 <<< (n + 2)) || err >= d || err <= -d) begin
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
      if (d32[31]) scaled++;
      if ((dut32.qp & dut32.qn) != 0) negzero++;
    end
    checks++;
    if (scaled == 0 || scaled == 3000 || negzero == 0) begin
      failures++; $display("FAIL a scaling case or the -0 digit never occurred");
    end
    $display("scaled divisors: %0d, divisions with -0 digits: %0d", scaled, negzero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
