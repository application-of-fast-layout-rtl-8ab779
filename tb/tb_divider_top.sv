// tb_divider_top: end-to-end test of the three dividers at their default
// size (32-bit mantissa fractions), with the top's parameters untouched.
// Each divider receives its own random operands. For every division the
// quotient is checked against A/D computed here: |A/D - Q| is below one
// unit of the last quotient digit, and the exact remainder identity of
// each divider holds. The test also counts how often each mechanism the
// design relies on occurs, and fails if one never does: the three radix-2
// digit values, all eight scaling factors K, every pseudo-radix-4 digit
// from -3 to +3 including both zeros, every radix-4 digit from -2 to +2
// including both zeros, both scaling cases of the scaled radix-2 divider
// and its "-0" digit code.
module tb_divider_top;
  import div_pkg::*;
  localparam int N = 32;
  localparam int L = (N + 4) / 2 + 1;
  logic [N-1:0] r2s_a_frac, r2s_d_frac;
  logic [N:0] r2s_quotient;
  logic [N+2:0] r2s_rem_pos, r2s_rem_neg;
  int r2s_scaled = 0, r2s_negzero = 0;
  logic [N-1:0] r2_a_frac, r2_d_frac, pr4_a_frac, pr4_d_frac, r4_a_frac, r4_d_frac;
  logic [N:0] r2_quotient, pr4_quotient, r4_quotient;
  logic [N+2:0] r2_rem_pos, r2_rem_neg;
  logic [N+5:0] pr4_rem_pos, pr4_rem_neg;
  logic [3*L-1:0] r4_rem;
  int checks = 0, failures = 0;
  int bound [8] = '{4, 6, 8, 12, 16, 20, 25, 32};
  int r2_seen [3];        // q = -1, 0, +1
  int k_seen [8];
  int pr4_seen [8];       // index: sign*4 + mag
  int r4_seen [6];        // -2,-1,-0,+0,+1,+2

  divider_top dut (.*);

  function automatic int k_of(logic [N-1:0] df);
    int x, kk;
    x = int'(df[N-1 -: 5]);
    kk = 0;
    while (x >= bound[kk]) kk++;
    return kk;
  endfunction

  // |A/D - Q| < 2^-qf  <=>  |A*2^qf - D*quotient| < D
  task automatic check_q(string name, logic [N-1:0] af, logic [N-1:0] df, logic [N:0] q, int qf);
    logic signed [159:0] a, d, err;
    a = (160'sd1 <<< N) + $signed({128'b0, af});
    d = (160'sd1 <<< N) + $signed({128'b0, df});
    err = (a <<< qf) - d * $signed({127'b0, q});
    checks++;
    if (err >= d || err <= -d) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h d=%h q=%h", name, af, df, q);
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
    for (int i = 0; i < 5000; i++) begin
      logic signed [159:0] a, d, ka, y, r;
      int kk;
      r2_a_frac  = $urandom; r2_d_frac  = $urandom;
      pr4_a_frac = $urandom; pr4_d_frac = $urandom;
      r4_a_frac  = $urandom; r4_d_frac  = $urandom;
      r2s_a_frac = $urandom; r2s_d_frac = $urandom;
      if (i < 32) begin   // walk the divisor through every K interval
        pr4_d_frac = {5'(i), 27'(i * 12345)};
        r4_d_frac  = {5'(31 - i), 27'(i * 777)};
      end
      #1;
      check_q("r2",  r2_a_frac,  r2_d_frac,  r2_quotient,  N - 1);
      check_q("pr4", pr4_a_frac, pr4_d_frac, pr4_quotient, N - 2);
      check_q("r4",  r4_a_frac,  r4_d_frac,  r4_quotient,  N - 2);
      check_q("r2s", r2s_a_frac, r2s_d_frac, r2s_quotient, N - 1);

      // exact remainder identity of the radix-2 array
      a = (160'sd1 <<< N) + $signed({128'b0, r2_a_frac});
      d = (160'sd1 <<< N) + $signed({128'b0, r2_d_frac});
      r = $signed({125'b0, r2_rem_pos}) - $signed({125'b0, r2_rem_neg});
      checks++;
      if ((a <<< N) != 2 * d * $signed({127'b0, r2_quotient}) + r) begin
        failures++; $display("FAIL r2 identity");
      end
      // pseudo-radix-4
      kk = k_of(pr4_d_frac);
      k_seen[kk]++;
      ka = ((160'sd1 <<< N) + $signed({128'b0, pr4_a_frac})) * (16 - kk);
      y  = ((160'sd1 <<< N) + $signed({128'b0, pr4_d_frac})) * (16 - kk);
      r = $signed({122'b0, pr4_rem_pos}) - $signed({122'b0, pr4_rem_neg});
      checks++;
      if ((ka <<< N) != 4 * y * $signed({127'b0, pr4_quotient}) + r) begin
        failures++; $display("FAIL pr4 identity");
      end
      // radix-4
      kk = k_of(r4_d_frac);
      k_seen[kk]++;
      ka = ((160'sd1 <<< N) + $signed({128'b0, r4_a_frac})) * (16 - kk);
      y  = ((160'sd1 <<< N) + $signed({128'b0, r4_d_frac})) * (16 - kk);
      r = 0;
      for (int j = 0; j < L; j++)
        r = r + (160'(signed'(-2 * int'(r4_rem[3*j+2]) + int'(r4_rem[3*j+1]) + int'(r4_rem[3*j])))
                 <<< (2 * j));
      checks++;
      if ((ka <<< N) != 4 * y * $signed({127'b0, r4_quotient}) + r) begin
        failures++; $display("FAIL r4 identity");
      end

      // scaled radix-2: K = 3/4 when d_1 = 1
      kk = r2s_d_frac[N-1] ? 3 : 4;
      ka = ((160'sd1 <<< N) + $signed({128'b0, r2s_a_frac})) * kk;
      y  = ((160'sd1 <<< N) + $signed({128'b0, r2s_d_frac})) * kk;
      r = $signed({125'b0, r2s_rem_pos}) - $signed({125'b0, r2s_rem_neg});
      checks++;
      if ((ka <<< N) != 2 * y * $signed({127'b0, r2s_quotient}) + r) begin
        failures++; $display("FAIL r2s identity");
      end
      if (r2s_d_frac[N-1]) r2s_scaled++;
      if ((dut.u_r2s.qp & dut.u_r2s.qn) != 0) r2s_negzero++;

      // mechanism counters
      for (int j = 0; j < N; j++)
        r2_seen[int'(dut.u_r2.qp[j]) - int'(dut.u_r2.qn[j]) + 1]++;
      for (int j = 0; j < N / 2; j++) begin
        pr4_seen[4 * int'(dut.u_pr4.qd[j].sign) + int'(dut.u_pr4.qd[j].mag)]++;
        r4_seen[dut.u_r4.qd[j].add ? (dut.u_r4.qd[j].u2 ? 0 : dut.u_r4.qd[j].u1 ? 1 : 2)
                                   : (dut.u_r4.qd[j].u2 ? 5 : dut.u_r4.qd[j].u1 ? 4 : 3)]++;
      end
    end
    for (int j = 0; j < 3; j++) begin
      checks++; if (r2_seen[j] == 0) begin failures++; $display("FAIL radix-2 digit %0d never used", j - 1); end
    end
    for (int j = 0; j < 8; j++) begin
      checks++; if (k_seen[j] == 0) begin failures++; $display("FAIL K code %0d never used", j); end
      checks++; if (pr4_seen[j] == 0) begin failures++; $display("FAIL pr4 digit code %0d never used", j); end
    end
    for (int j = 0; j < 6; j++) begin
      checks++; if (r4_seen[j] == 0) begin failures++; $display("FAIL radix-4 digit code %0d never used", j); end
    end
    checks++;
    if (r2s_scaled == 0 || r2s_scaled == 5000 || r2s_negzero == 0) begin
      failures++; $display("FAIL scaled radix-2: a scaling case or the -0 code never occurred");
    end
    $display("scaled radix-2: K=3/4 in %0d divisions, -0 digits in %0d", r2s_scaled, r2s_negzero);
    $display("radix-2 digits -1/0/+1: %0d %0d %0d", r2_seen[0], r2_seen[1], r2_seen[2]);
    $display("K codes: %0d %0d %0d %0d %0d %0d %0d %0d", k_seen[0], k_seen[1], k_seen[2], k_seen[3],
             k_seen[4], k_seen[5], k_seen[6], k_seen[7]);
    $display("pr4 digits -0..-3, +0..+3: %0d %0d %0d %0d / %0d %0d %0d %0d", pr4_seen[0], pr4_seen[1],
             pr4_seen[2], pr4_seen[3], pr4_seen[4], pr4_seen[5], pr4_seen[6], pr4_seen[7]);
    $display("radix-4 digits -2,-1,-0,+0,+1,+2: %0d %0d %0d %0d %0d %0d", r4_seen[0], r4_seen[1],
             r4_seen[2], r4_seen[3], r4_seen[4], r4_seen[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
