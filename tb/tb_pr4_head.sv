// tb_pr4_head: exhaustive test of the pseudo-radix-4 head cell.
// For all 64 borrow-save inputs checks against the digit table worked out
// here: |q| = integer part of Sigma_in truncated towards zero, sign = 1 iff
// Sigma_in > 0, and Sigma_in minus the leading part of q*Y (|q| + 0.5 for a
// positive digit, -|q| for a negative one) equals -0.5 * s_1_neg.
module tb_pr4_head;
  import div_pkg::*;
  logic [1:0] r_m1, r_0, r_1;
  pr4_qdigit_t q;
  logic s_1_neg;
  int checks = 0, failures = 0;

  pr4_head dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      int sh, mag_want, sign_want, rest_h;
      {r_m1, r_0, r_1} = 6'(v);
      #1;
      sh = 4 * (int'(r_m1[1]) - int'(r_m1[0])) + 2 * (int'(r_0[1]) - int'(r_0[0]))
         + (int'(r_1[1]) - int'(r_1[0]));           // halves
      sign_want = (sh > 0) ? 1 : 0;
      mag_want = (sh >= 0 ? sh : -sh) / 2;
      // remainder left in halves
      rest_h = q.sign ? sh - (2 * int'(q.mag) + 1) : sh + 2 * int'(q.mag);
      checks++;
      if (int'(q.sign) != sign_want || int'(q.mag) != mag_want || rest_h != -int'(s_1_neg)) begin
        failures++;
        $display("FAIL sigma_h=%0d sign=%0d mag=%0d s1n=%0d", sh, q.sign, q.mag, s_1_neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
