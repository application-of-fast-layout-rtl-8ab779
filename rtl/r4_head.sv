// r4_head: head cell of the radix-4 divider slice.
//
// Reads the two leading remainder digits r_1 (weight 1) and r_2 (weight
// 1/4), each -2*n + p + pp in {-2..2}, and forms E = 4*r_1 + r_2 in
// quarters (-10..10). The quotient digit q in {-2..2} follows the selection
// rule of the divisor range [1, 9/8): with estimate E/4,
//     E in [0,2]  -> 0        E in [-2,-1]  -> 0 (add form)
//     E in [3,6]  -> 1        E in [-6,-3]  -> -1
//     E in [7,10] -> 2        E in [-10,-7] -> -2
// i.e. the thresholds 7/12 and 19/12 of the remainder fall between
// estimates. q is coded as add (negative digit), u1 (|q| = 1), u2 (|q| = 2).
// The head also removes the integer and first radix-4 digit of q*Y: what
// is left, H = E - 4|q| - 1 when subtracting (the -1 belongs to the
// complement of the lower digits) or H = E + 4|q| when adding, always lies
// in [-2,1] and is output as s_1_pos - 2*s_1_neg; the first tail cell adds
// its carry s_1++. The selection thresholds follow the source design; the
// digit code and the arithmetic form are this design's choices.
// Purely combinational.
module r4_head
  import div_pkg::*;
(
  input  r4_digit_t  r_1,
  input  r4_digit_t  r_2,
  output r4_qdigit_t q,
  output logic       s_1_pos,
  output logic       s_1_neg
);
  int e, mag, h;
  always_comb begin
    e = 4 * r4_digit_value(r_1) + r4_digit_value(r_2);
    q.add = (e < 0);
    if (e < 0) mag = (e <= -7) ? 2 : (e <= -3) ? 1 : 0;
    else       mag = (e >=  7) ? 2 : (e >=  3) ? 1 : 0;
    q.u1 = (mag == 1);
    q.u2 = (mag == 2);
    h = q.add ? e + 4 * mag : e - 4 * mag - 1;
    // h in {-2,-1,0,1} = s_1_pos - 2*s_1_neg
    s_1_neg = (h < 0);
    s_1_pos = (h == 1) || (h == -1);
  end
endmodule
