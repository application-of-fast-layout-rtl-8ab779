// pr4_tail: tail cell of the pseudo-radix-4 divider slice.
//
// A 4-input multiplexer picks the bit of |q|*Y at this position
// (0, y_i, y_i+1 = bit of 2Y, f_i = bit of 3Y for |q| = 0..3); an XOR with
// the digit sign complements it for positive digits, giving sigma_i. A
// borrow-save cell then adds it to the remainder digit carry-free:
//     2*s_up_pos - s_neg = r_pos - r_neg + sigma_i
// The structure (mux, XOR, BS adder) follows the source design.
// Purely combinational.
module pr4_tail
  import div_pkg::*;
(
  input  logic        r_pos,
  input  logic        r_neg,
  input  logic        y_i,     // bit of Y at this weight
  input  logic        y_i1,    // next lower bit of Y (= bit of 2Y here)
  input  logic        f_i,     // bit of F = 3Y at this weight
  input  pr4_qdigit_t q,
  output logic        s_up_pos,
  output logic        s_neg
);
  logic m;
  always_comb begin
    case (q.mag)
      2'd0: m = 1'b0;
      2'd1: m = y_i;
      2'd2: m = y_i1;
      2'd3: m = f_i;
    endcase
  end
  // sign = 1: add ~m (subtract), sign = 0: add m
  bs_tail u_bs (.r_pos(r_pos), .r_neg(r_neg), .d(m), .q_pos(q.sign), .q_neg(~q.sign),
                .s_up_pos(s_up_pos), .s_neg(s_neg));
endmodule
