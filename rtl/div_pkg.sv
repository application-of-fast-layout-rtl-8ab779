// div_pkg: types and helper functions shared by the three array dividers.
//
// Radix-2 and pseudo-radix-4 remainders use borrow-save (BS) digits: a digit
// is the difference of two bits, plus - minus, in {-1,0,1}. The radix-4
// remainder uses three bits per digit, value -2*n + p + pp, in {-2..2}
// (the same form as a radix-4 Booth digit). Quotient digits of the two
// radix-4 dividers are sign/magnitude codes. All operands are mantissas
// 1.f with the hidden one explicit inside the dividers.
package div_pkg;

  // Radix-4 remainder digit: value = -2*n + p + pp.
  typedef struct packed {
    logic n;
    logic p;
    logic pp;
  } r4_digit_t;

  // Pseudo-radix-4 quotient digit: sign = 1 marks a positive digit (the
  // divisor multiple is subtracted), mag = |q| in 0..3.
  typedef struct packed {
    logic       sign;
    logic [1:0] mag;
  } pr4_qdigit_t;

  // Radix-4 quotient digit: add = 1 marks a negative digit (the multiple is
  // added), u1 selects 1*Y, u2 selects 2*Y. Both clear means zero.
  typedef struct packed {
    logic add;
    logic u1;
    logic u2;
  } r4_qdigit_t;

  function automatic int r4_digit_value(r4_digit_t d);
    return -2 * int'(d.n) + int'(d.p) + int'(d.pp);
  endfunction

  function automatic int bs_value(logic pos, logic neg);
    return int'(pos) - int'(neg);
  endfunction

endpackage
