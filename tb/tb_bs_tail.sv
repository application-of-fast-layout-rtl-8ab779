// tb_bs_tail: exhaustive test of the borrow-save tail cell.
// For all 32 input combinations checks 2*s_up_pos - s_neg against
// r_pos - r_neg + t, with t = (q_pos & ~d) | (q_neg & d) worked out here.
module tb_bs_tail;
  logic r_pos, r_neg, d, q_pos, q_neg, s_up_pos, s_neg;
  int checks = 0, failures = 0;

  bs_tail dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int t, want, got;
      {r_pos, r_neg, d, q_pos, q_neg} = 5'(v);
      #1;
      t = (q_pos && !d) || (q_neg && d) ? 1 : 0;
      want = int'(r_pos) - int'(r_neg) + t;
      got = 2 * int'(s_up_pos) - int'(s_neg);
      checks++;
      if (got !== want) begin
        failures++;
        $display("FAIL in=%b got=%0d want=%0d", 5'(v), got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
