// bs_tail: borrow-save tail cell of the radix-2 divider slice.
//
// Adds one borrow-save remainder digit r = r_pos - r_neg and one selected
// divisor bit t = (q_pos & ~d) | (q_neg & d) without carry propagation:
//     2*s_up_pos - s_neg = r_pos - r_neg + t
// The sum lies in {-1,0,1,2} and has exactly one (s_up_pos, s_neg) code.
// s_up_pos belongs to the next more significant digit of the slice output,
// s_neg to this digit. With q_pos = 1 the cell adds the complemented divisor
// bit (subtract D), with q_neg = 1 the true bit (add D); q_pos = q_neg = 1
// adds a constant one, which the scaled radix-2 head uses for "-0".
// The identity is the one the cell is defined by; the gate form below
// (an inverted full adder) is this design's choice. Purely combinational.
module bs_tail (
  input  logic r_pos,
  input  logic r_neg,
  input  logic d,
  input  logic q_pos,
  input  logic q_neg,
  output logic s_up_pos,
  output logic s_neg
);
  logic t;
  always_comb begin
    t = (q_pos & ~d) | (q_neg & d);
    // r_pos + ~r_neg + t = 2*c + s ; subtracting 1 gives r_pos - r_neg + t,
    // so 2*c - (1 - s) = r_pos - r_neg + t.
    s_up_pos = (r_pos & ~r_neg) | (r_pos & t) | (~r_neg & t);
    s_neg    = ~(r_pos ^ ~r_neg ^ t);
  end
endmodule
