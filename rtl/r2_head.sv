// r2_head: head cell of the radix-2 borrow-save divider slice (no scaling).
//
// Looks at the three most significant borrow-save digits r_-2, r_-1, r_0 of
// the partial remainder (weights 4, 2, 1), forms their integer value
// Sigma_in in [-4,4] and picks the quotient digit from its sign:
// q = +1 (q_pos) if Sigma_in > 0, q = -1 (q_neg) if Sigma_in < 0, else 0.
// At the same time it does the integer part of R - q*D: with
// -D = -2 + sum(~d_i 2^-i) + 2^-n and +D = 1 + sum(d_i 2^-i) the head value
// is Sigma_in - 2, Sigma_in + 1 or Sigma_in, always in [-3,2], and it is
// returned on three bits as 2*(s_m1_pos - s_m1_neg) - s_0_neg. The tail
// cells add the fraction of the divisor; the carry into s_0+ comes from the
// first tail. The selection rule and the three-output head follow the
// source description; the cell is written from that function rather than
// from a gate equation. Purely combinational.
module r2_head (
  input  logic [1:0] r_m2,      // {plus, minus} of digit r_-2
  input  logic [1:0] r_m1,      // digit r_-1
  input  logic [1:0] r_0,       // digit r_0
  output logic       q_pos,
  output logic       q_neg,
  output logic       s_m1_pos,
  output logic       s_m1_neg,
  output logic       s_0_neg
);
  int sigma, h;
  always_comb begin
    sigma = 4 * (int'(r_m2[1]) - int'(r_m2[0]))
          + 2 * (int'(r_m1[1]) - int'(r_m1[0]))
          +     (int'(r_0[1])  - int'(r_0[0]));
    q_pos = (sigma > 0);
    q_neg = (sigma < 0);
    h = q_pos ? sigma - 2 : (q_neg ? sigma + 1 : sigma);
    s_0_neg = h[0];                        // parity of the head value
    // (h + s_0_neg)/2 is in {-1,0,1}: encode as s_m1_pos - s_m1_neg
    s_m1_pos = ((h + int'(h[0])) > 0);
    s_m1_neg = ((h + int'(h[0])) < 0);
  end
endmodule
