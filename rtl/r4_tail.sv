// r4_tail: tail cell of the radix-4 divider slice.
//
// Selects the radix-4 digit of the divisor multiple, 0, Y or 2Y, by u1/u2
// (two bits each, value 2*hi + lo), inverts both bits unless add is set
// (subtraction by complement; the missing +1 enters at the least
// significant cell), and adds it to the remainder digit r = -2n + p + pp:
//     4*s_up_pp + s_pos - 2*s_neg = r + sigma ,  sigma in 0..3
// The sum lies in -2..5; s_up_pp is the carry into the next more
// significant output digit, (s_pos, s_neg) the local part in -2..1.
// The cell function follows the source design; its arithmetic form is this
// design's choice. Purely combinational.
module r4_tail
  import div_pkg::*;
(
  input  r4_digit_t  r,
  input  logic [1:0] y_d,    // radix-4 digit of Y
  input  logic [1:0] y2_d,   // radix-4 digit of 2Y
  input  r4_qdigit_t q,
  output logic       s_up_pp,
  output logic       s_pos,
  output logic       s_neg
);
  logic [1:0] m, sigma;
  int v, w;
  always_comb begin
    m = q.u1 ? y_d : (q.u2 ? y2_d : 2'b00);
    sigma = q.add ? m : ~m;
    v = r4_digit_value(r) + int'(sigma);
    s_up_pp = (v >= 2);
    w = s_up_pp ? v - 4 : v;
    s_neg = (w < 0);
    s_pos = (w == 1) || (w == -1);
  end
endmodule
