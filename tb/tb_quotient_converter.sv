// tb_quotient_converter: random and corner test of Q = pos - neg at the
// 33-bit width used by the dividers and at 9 bits.
module tb_quotient_converter;
  logic [32:0] pos, neg, q;
  logic [8:0]  pos9, neg9, q9;
  int checks = 0, failures = 0;

  quotient_converter #(.W(33)) dut (.pos(pos), .neg(neg), .q(q));
  quotient_converter #(.W(9))  dut9 (.pos(pos9), .neg(neg9), .q(q9));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      longint signed want;
      pos = {$urandom, $urandom} & 33'h1_5555_5555;
      neg = {$urandom, $urandom} & 33'h0_aaaa_aaaa;
      if (i == 0) begin pos = '0; neg = '0; end
      if (i == 1) begin pos = '1; neg = '0; end
      pos9 = pos[8:0];
      neg9 = neg[8:0];
      #1;
      want = longint'(pos) - longint'(neg);
      checks++;
      if (q !== 33'(want)) begin
        failures++;
        $display("FAIL pos=%h neg=%h q=%h", pos, neg, q);
      end
      checks++;
      if (q9 !== 9'(int'(pos9) - int'(neg9))) begin
        failures++;
        $display("FAIL9 pos=%h neg=%h q=%h", pos9, neg9, q9);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
