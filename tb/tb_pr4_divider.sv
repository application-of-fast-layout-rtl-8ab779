// tb_pr4_divider: pseudo-radix-4 array divider at 8 bits (all operand
// pairs), 16 and 32 bits (random and corner operands).
// K is worked out here from the interval table; with KA = (16-k)*A and
// Y = (16-k)*D in units 2^-(N+4) each division must satisfy
//     KA * 4^(N/2) = 4 * Y * quotient + R_final ,   |R_final| < 4 * 2^(N+4)
// and |A/D - Q| < 4^-(N/2-1). Digit magnitudes 3 (the 3Y multiple) and
// both signs must occur in the 32-bit array.
module tb_pr4_divider;
  logic [7:0]  a8, d8;    logic [8:0]  q8;  logic [13:0] rp8, rn8;
  logic [15:0] a16, d16;  logic [16:0] q16; logic [21:0] rp16, rn16;
  logic [31:0] a32, d32;  logic [32:0] q32; logic [37:0] rp32, rn32;
  int checks = 0, failures = 0, mag3 = 0, negd = 0;
  int bound [8] = '{4, 6, 8, 12, 16, 20, 25, 32};

  pr4_divider #(.N(8))  dut8  (.a_frac(a8),  .d_frac(d8),  .quotient(q8),  .rem_pos(rp8),  .rem_neg(rn8));
  pr4_divider #(.N(16)) dut16 (.a_frac(a16), .d_frac(d16), .quotient(q16), .rem_pos(rp16), .rem_neg(rn16));
  pr4_divider #(.N(32)) dut32 (.a_frac(a32), .d_frac(d32), .quotient(q32), .rem_pos(rp32), .rem_neg(rn32));

  task automatic check(int n, logic [63:0] af, logic [63:0] df, logic [63:0] q,
                       logic [63:0] rp, logic [63:0] rn);
    logic signed [159:0] a, d, ka, y, r, lhs, rhs, err;
    int x, kk, m;
    m = n / 2;
    x = int'(df >> (n - 5));
    kk = 0;
    while (x >= bound[kk]) kk++;
    a = (160'sd1 <<< n) + $signed({96'b0, af});
    d = (160'sd1 <<< n) + $signed({96'b0, df});
    ka = a * (16 - kk);
    y = d * (16 - kk);
    r = $signed({96'b0, rp}) - $signed({96'b0, rn});
    lhs = ka <<< (2 * m);
    rhs = 4 * y * $signed({96'b0, q}) + r;
    err = (a <<< (2 * m - 2)) - d * $signed({96'b0, q});
    checks++;
    if (lhs != rhs || r >= (160'sd4 <<< (n + 4)) || r <= -(160'sd4 <<< (n + 4))
        || err >= d || err <= -d) begin
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
      for (int b = 0; b < 16; b++) begin
        if (dut32.qpos_vec[2*b +: 2] == 2'd3 || dut32.qneg_vec[2*b +: 2] == 2'd3) mag3++;
        if (dut32.qneg_vec[2*b +: 2] != 2'd0) negd++;
      end
    end
    checks++;
    if (mag3 == 0 || negd == 0) begin failures++; $display("FAIL digit 3 or negative digit never seen"); end
    $display("digits of magnitude 3: %0d, negative digits: %0d", mag3, negd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
