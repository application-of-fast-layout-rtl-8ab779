// tb_r2_head: exhaustive test of the radix-2 head cell.
// For every borrow-save input whose value Sigma_in lies in [-4,4] (the
// range reachable in the divider) checks the quotient digit (sign of
// Sigma_in), that q_pos and q_neg are never both set, that s_-1 is never
// (1,1), and that 2*(s_m1_pos - s_m1_neg) - s_0_neg equals Sigma_in - 2,
// Sigma_in + 1 or Sigma_in for q = +1, -1, 0.
module tb_r2_head;
  logic [1:0] r_m2, r_m1, r_0;
  logic q_pos, q_neg, s_m1_pos, s_m1_neg, s_0_neg;
  int checks = 0, failures = 0;

  r2_head dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      int sigma, q_want, h_want, h_got, q_got;
      {r_m2, r_m1, r_0} = 6'(v);
      #1;
      sigma = 4 * (int'(r_m2[1]) - int'(r_m2[0])) + 2 * (int'(r_m1[1]) - int'(r_m1[0]))
            + (int'(r_0[1]) - int'(r_0[0]));
      if (sigma < -4 || sigma > 4) continue;
      q_want = (sigma > 0) ? 1 : (sigma < 0) ? -1 : 0;
      h_want = (q_want == 1) ? sigma - 2 : (q_want == -1) ? sigma + 1 : sigma;
      q_got = int'(q_pos) - int'(q_neg);
      h_got = 2 * (int'(s_m1_pos) - int'(s_m1_neg)) - int'(s_0_neg);
      checks++;
      if (q_got != q_want || (q_pos && q_neg) || (s_m1_pos && s_m1_neg) || h_got != h_want) begin
        failures++;
        $display("FAIL sigma=%0d q=%0d/%0d h=%0d/%0d", sigma, q_got, q_want, h_got, h_want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
