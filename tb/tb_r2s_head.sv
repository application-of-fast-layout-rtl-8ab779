// tb_r2s_head: exhaustive test of the scaled radix-2 head cell against
// its digit table (value Sigma_in -> q_pos, q_neg, s_1_neg), written out
// here row by row, and against the arithmetic rule that Sigma_in minus the
// leading part of q*Y equals -0.5 * s_1_neg.
module tb_r2s_head;
  logic [1:0] r_0, r_1;
  logic q_pos, q_neg, s_1_neg;
  int checks = 0, failures = 0;
  // rows for Sigma_in = -1.5, -1, -0.5, 0, 0.5, 1, 1.5: {q_pos, q_neg, s_1_neg}
  logic [2:0] table_row [7] = '{3'b011, 3'b010, 3'b001, 3'b000, 3'b110, 3'b101, 3'b100};

  r2s_head dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int sh, lead_h;
      {r_0, r_1} = 4'(v);
      #1;
      sh = 2 * (int'(r_0[1]) - int'(r_0[0])) + (int'(r_1[1]) - int'(r_1[0]));
      // leading part of -q*Y in halves: +1 -> -3, -1 -> +2, "-0" -> -1, 0 -> 0
      lead_h = (q_pos && !q_neg) ? -3 : (!q_pos && q_neg) ? 2 : (q_pos && q_neg) ? -1 : 0;
      checks++;
      if ({q_pos, q_neg, s_1_neg} != table_row[sh + 3] || sh + lead_h != -int'(s_1_neg)) begin
        failures++;
        $display("FAIL sigma_h=%0d got=%b", sh, {q_pos, q_neg, s_1_neg});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
