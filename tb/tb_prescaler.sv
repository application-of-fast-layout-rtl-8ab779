// tb_prescaler: random and corner test of the operand scaling unit (N=32).
// Independently of the design it works out K from the interval table,
// then checks Y = K*D, F = 3*Y, K*A (binary and borrow-save) exactly, and
// that 1 <= Y < 9/8. Every K value is exercised.
module tb_prescaler;
  localparam int N = 32;
  localparam int FR = N + 4;
  logic [N-1:0] a_frac, d_frac;
  logic [2:0] k;
  logic [FR:0] y, ka;
  logic [FR+1:0] f, ka_pos, ka_neg;
  int checks = 0, failures = 0;
  int bound [8] = '{4, 6, 8, 12, 16, 20, 25, 32};
  int k_seen [8];

  prescaler #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [127:0] av, dv, y_w, f_w, ka_w;
      int kk, x;
      a_frac = $urandom;
      d_frac = $urandom;
      if (i < 32) d_frac = {5'(i), 27'h0};             // every interval start
      if (i >= 32 && i < 64) d_frac = {5'(i - 32), 27'h7ff_ffff}; // and end
      if (i == 64) a_frac = '1;
      #1;
      x = int'(d_frac[N-1 -: 5]);
      kk = 0;
      while (x >= bound[kk]) kk++;
      k_seen[kk]++;
      av = {95'b0, 1'b1, a_frac};
      dv = {95'b0, 1'b1, d_frac};
      y_w  = (dv * 128'(16 - kk));          // K*D in units 2^-(N+4)
      f_w  = 3 * y_w;
      ka_w = (av * 128'(16 - kk));
      checks++;
      if (128'(y) != y_w || 128'(f) != f_w || 128'(ka) != ka_w
          || 128'(ka_pos) - 128'(ka_neg) != ka_w || int'(k) != kk) begin
        failures++;
        $display("FAIL a=%h d=%h k=%0d/%0d y=%h f=%h ka=%h", a_frac, d_frac, k, kk, y, f, ka);
      end
      checks++;
      if (y_w < (128'(1) << FR) || y_w >= (128'(9) << (FR - 3))) begin
        failures++;
        $display("FAIL range d=%h y=%h", d_frac, y);
      end
    end
    for (int kk = 0; kk < 8; kk++) begin
      checks++;
      if (k_seen[kk] == 0) begin failures++; $display("FAIL K code %0d never used", kk); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
