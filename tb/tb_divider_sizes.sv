// tb_divider_sizes: runs the four dividers at widths the per-divider
// testbenches do not reach: 4 bits (every operand pair) and 64 bits (random
// and corner operands). For each divider the quotient code Q must satisfy
//     | A * 2^s - D * Q | < D ,   s = N-1 (radix 2) or N-2 (radix 4)
// with A = 1.a_frac and D = 1.d_frac, i.e. the quotient is within one unit
// of its last place of A/D. The remainder identities are checked by the
// per-divider testbenches; this one covers widths they do not reach.
module tb_divider_sizes;
  localparam int unsigned W = 192;

  logic [3:0]   a4, d4;
  logic [63:0]  a64, d64;
  logic [4:0]   q4 [4];
  logic [64:0]  q64 [4];
  int checks = 0, failures = 0;

  r2_divider  #(.N(4))   u_r2_4    (.a_frac(a4),   .d_frac(d4),   .quotient(q4[0]),   .rem_pos(), .rem_neg());
  r2s_divider #(.N(4))   u_r2s_4   (.a_frac(a4),   .d_frac(d4),   .quotient(q4[1]),   .rem_pos(), .rem_neg());
  pr4_divider #(.N(4))   u_pr4_4   (.a_frac(a4),   .d_frac(d4),   .quotient(q4[2]),   .rem_pos(), .rem_neg());
  r4_divider  #(.N(4))   u_r4_4    (.a_frac(a4),   .d_frac(d4),   .quotient(q4[3]),   .rem());
  r2_divider  #(.N(64))  u_r2_64   (.a_frac(a64),  .d_frac(d64),  .quotient(q64[0]),  .rem_pos(), .rem_neg());
  r2s_divider #(.N(64))  u_r2s_64  (.a_frac(a64),  .d_frac(d64),  .quotient(q64[1]),  .rem_pos(), .rem_neg());
  pr4_divider #(.N(64))  u_pr4_64  (.a_frac(a64),  .d_frac(d64),  .quotient(q64[2]),  .rem_pos(), .rem_neg());
  r4_divider  #(.N(64))  u_r4_64   (.a_frac(a64),  .d_frac(d64),  .quotient(q64[3]),  .rem());

  // kind: 0 r2, 1 r2s, 2 pr4, 3 r4
  task automatic check(int n, int kind, logic [W-1:0] af, logic [W-1:0] df, logic [W-1:0] q);
    logic signed [W-1:0] a, d, err;
    int s;
    s = (kind < 2) ? n - 1 : n - 2;
    a = (W'(1) << n) | af;
    d = (W'(1) << n) | df;
    err = (a <<< s) - d * $signed(q);
    checks++;
    if (err >= d || err <= -d) begin
      failures++;
      if (failures < 10) $display("FAIL n=%0d kind=%0d a=%h d=%h q=%h", n, kind, af, df, q);
    end
  endtask


  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a4, d4} = 8'(i);
      #1;
      for (int k = 0; k < 4; k++) check(4, k, W'(a4), W'(d4), W'(q4[k]));
    end
    for (int i = 0; i < 2000; i++) begin
      a64 = {$urandom, $urandom};
      d64 = {$urandom, $urandom};
      case (i)
        0: begin a64 = '0; d64 = '0; end
        1: begin a64 = '1; d64 = '0; end
        2: begin a64 = '0; d64 = '1; end
        3: begin a64 = '1; d64 = '1; end
        default: ;
      endcase
      #1;
      for (int k = 0; k < 4; k++) begin
        check(64,  k, W'(a64),  W'(d64),  W'(q64[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
