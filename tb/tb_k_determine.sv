// tb_k_determine: exhaustive test of the scaling factor choice.
// For each 5-bit prefix x the divisor lies in [1 + x/32, 1 + (x+1)/32);
// the test checks that K = 1 - k/16 maps that whole interval into
// [1, 9/8], i.e. (16-k)*(32+x) >= 512 and (16-k)*(33+x) <= 576, and that
// k matches the interval table of the design (reference values below).
module tb_k_determine;
  logic [4:0] d_top;
  logic [2:0] k;
  int checks = 0, failures = 0;
  // reference: upper bound (in 32nds above 1) of each K interval
  int bound [8] = '{4, 6, 8, 12, 16, 20, 25, 32};

  k_determine dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 32; x++) begin
      int kk, want;
      d_top = 5'(x);
      #1;
      kk = int'(k);
      want = 0;
      while (x >= bound[want]) want++;
      checks++;
      if (kk != want || (16 - kk) * (32 + x) < 512 || (16 - kk) * (33 + x) > 576) begin
        failures++;
        $display("FAIL x=%0d k=%0d want=%0d", x, kk, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
