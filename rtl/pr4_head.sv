// pr4_head: head cell of the pseudo-radix-4 divider slice.
//
// Reads the three leading borrow-save digits r_-1, r_0, r_1 (weights 2, 1,
// 1/2), whose value Sigma_in is one of the 15 halves in [-3.5, 3.5]. The
// quotient digit is the integer part of Sigma_in truncated towards zero,
// in sign/magnitude form: sign = 1 (positive digit, Y multiple subtracted)
// when Sigma_in > 0, sign = 0 otherwise, so Sigma_in = 0.5 gives "+0" and
// Sigma_in in {-0.5, 0} gives "-0". The integer part of q*Y (bold part) is
// cancelled here: what is left of Sigma_in is -0.5 or 0 and is returned as
// s_1_neg = r_1+ xor r_1- xor sign (weight 1/2). The tail cells supply the
// rest of R - q*Y. Selection and output follow the source design's table;
// the arithmetic form below (instead of a chain of borrow-save cells) is
// this design's choice. Purely combinational.
module pr4_head
  import div_pkg::*;
(
  input  logic [1:0]  r_m1,   // {plus, minus} of digit r_-1
  input  logic [1:0]  r_0,
  input  logic [1:0]  r_1,
  output pr4_qdigit_t q,
  output logic        s_1_neg
);
  int sig_h;   // Sigma_in in halves, -7..7
  int mag;
  always_comb begin
    sig_h = 4 * bs_value(r_m1[1], r_m1[0])
          + 2 * bs_value(r_0[1],  r_0[0])
          +     bs_value(r_1[1],  r_1[0]);
    q.sign = (sig_h > 0);
    mag    = (sig_h > 0) ? sig_h / 2 : (-sig_h) / 2;
    q.mag  = mag[1:0];
    s_1_neg = r_1[1] ^ r_1[0] ^ q.sign;
  end
endmodule
