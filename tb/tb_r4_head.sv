// tb_r4_head: exhaustive test of the radix-4 head cell.
// For all 64 pairs of 3-bit digit codes: E = 4*r_1 + r_2 (quarters); the
// expected digit is 0 for E in [-2,2] (add form below 0), +-1 for |E| in
// [3,6], +-2 for |E| in [7,10]; u1 and u2 never both set; and the head
// rest s_1_pos - 2*s_1_neg equals E - 4|q| - 1 (subtract) or E + 4|q| (add).
module tb_r4_head;
  import div_pkg::*;
  r4_digit_t r_1, r_2;
  r4_qdigit_t q;
  logic s_1_pos, s_1_neg;
  int checks = 0, failures = 0;

  r4_head dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      int d1, d2, e, ae, mag_want, mag_got, rest;
      {r_1, r_2} = 6'(v);
      #1;
      d1 = -2 * int'(r_1.n) + int'(r_1.p) + int'(r_1.pp);
      d2 = -2 * int'(r_2.n) + int'(r_2.p) + int'(r_2.pp);
      e = 4 * d1 + d2;
      ae = (e < 0) ? -e : e;
      mag_want = (ae >= 7) ? 2 : (ae >= 3) ? 1 : 0;
      mag_got = q.u2 ? 2 : q.u1 ? 1 : 0;
      rest = q.add ? e + 4 * mag_got : e - 4 * mag_got - 1;
      checks++;
      if (mag_got != mag_want || (q.u1 && q.u2) || int'(q.add) != (e < 0 ? 1 : 0)
          || rest != int'(s_1_pos) - 2 * int'(s_1_neg)) begin
        failures++;
        $display("FAIL e=%0d add=%0d u1=%0d u2=%0d rest=%0d s=%0d%0d", e, q.add, q.u1, q.u2, rest,
                 s_1_pos, s_1_neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
