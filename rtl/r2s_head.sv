// r2s_head: head cell of the radix-2 divider slice with operand scaling.
//
// With the divisor scaled to Y in [1, 1.5), Y = 1.0 y_2 y_3 ..., the head
// needs only the two leading borrow-save digits r_0 and r_1 (weights 1 and
// 1/2). Their value Sigma_in in {-1.5 .. 1.5} selects the quotient digit
// and its code (q_pos, q_neg):
//     -1.5, -1 -> -1 (0,1)     -0.5, 0 -> 0 (0,0)     0.5 -> "-0" (1,1)
//      1, 1.5  -> +1 (1,0)
// The code (1,1) makes every tail cell add a one and the lowest plus bit a
// further 2^-n, i.e. 1/2 in all, which the head takes back; this writes
// zero as -0.5 + 0.5 and keeps the head output within one bit. What is
// left of Sigma_in after removing the leading part of q*Y (-1.5 for +1,
// +1 for -1, -0.5 for "-0") is -0.5 or 0 and is returned as
// s_1_neg = q_pos xor r_1+ xor r_1- (weight 1/2). The digit table follows
// the source design; the cell is written from the table rather than
// gates. Purely combinational.
module r2s_head (
  input  logic [1:0] r_0,    // {plus, minus} of digit r_0
  input  logic [1:0] r_1,    // digit r_1
  output logic       q_pos,
  output logic       q_neg,
  output logic       s_1_neg
);
  int sig_h;   // Sigma_in in halves, -3..3
  always_comb begin
    sig_h = 2 * (int'(r_0[1]) - int'(r_0[0])) + (int'(r_1[1]) - int'(r_1[0]));
    q_pos = (sig_h >= 1);
    q_neg = (sig_h <= -2) || (sig_h == 1);
    s_1_neg = q_pos ^ r_1[1] ^ r_1[0];
  end
endmodule
