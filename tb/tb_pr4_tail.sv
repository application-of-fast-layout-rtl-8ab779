// tb_pr4_tail: exhaustive test of the pseudo-radix-4 tail cell.
// Checks 2*s_up_pos - s_neg = r_pos - r_neg + sigma, where sigma is the
// selected bit (0, y_i, y_i1, f_i for |q| = 0..3), inverted for sign = 1.
module tb_pr4_tail;
  import div_pkg::*;
  logic r_pos, r_neg, y_i, y_i1, f_i, s_up_pos, s_neg;
  pr4_qdigit_t q;
  int checks = 0, failures = 0;

  pr4_tail dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int m, sigma, want, got;
      {r_pos, r_neg, y_i, y_i1, f_i, q} = 8'(v);
      #1;
      m = (q.mag == 0) ? 0 : (q.mag == 1) ? int'(y_i) : (q.mag == 2) ? int'(y_i1) : int'(f_i);
      sigma = q.sign ? 1 - m : m;
      want = int'(r_pos) - int'(r_neg) + sigma;
      got = 2 * int'(s_up_pos) - int'(s_neg);
      checks++;
      if (got != want) begin
        failures++;
        $display("FAIL in=%b got=%0d want=%0d", 8'(v), got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
