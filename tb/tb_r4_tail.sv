// tb_r4_tail: exhaustive test of the radix-4 tail cell.
// Checks 4*s_up_pp + s_pos - 2*s_neg = r + sigma for every remainder digit
// code, divisor digits and valid quotient code, with sigma the selected
// radix-4 digit of 0, Y or 2Y, inverted (3 - digit) when add is clear.
module tb_r4_tail;
  import div_pkg::*;
  r4_digit_t r;
  logic [1:0] y_d, y2_d;
  r4_qdigit_t q;
  logic s_up_pp, s_pos, s_neg;
  int checks = 0, failures = 0;

  r4_tail dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1024; v++) begin
      int m, sigma, want, got;
      {r, y_d, y2_d, q} = 10'(v);
      if (q.u1 && q.u2) continue;
      #1;
      m = q.u1 ? int'(y_d) : q.u2 ? int'(y2_d) : 0;
      sigma = q.add ? m : 3 - m;
      want = -2 * int'(r.n) + int'(r.p) + int'(r.pp) + sigma;
      got = 4 * int'(s_up_pp) + int'(s_pos) - 2 * int'(s_neg);
      checks++;
      if (got != want) begin
        failures++;
        $display("FAIL in=%b got=%0d want=%0d", 10'(v), got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
