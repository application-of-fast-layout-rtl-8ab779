// pr4_divider: combinational pseudo-radix-4 array divider with operand
// scaling.
//
// Both mantissas are first multiplied by K (prescaler) so that the divisor
// Y = K*D lies in [1, 9/8); then 2Y and 3Y have constant leading bits
// (10.0 and 11.0), and the head of each slice can take the quotient digit
// straight from the three leading remainder digits without looking at the
// divisor. The first partial remainder is K*A in borrow-save form (no carry
// propagated). Each of the N/2 slices produces one digit q_j in {-3..3}
// (weight 4^-j) and computes R(j+1) = 4*(R(j) - q_j*Y) in borrow-save form,
// all arithmetic being binary; hence "pseudo" radix 4. The digits, in
// sign/magnitude form, make two binary vectors (positive and negative
// magnitudes, two bits per digit) that the quotient converter subtracts.
//
// Interface: a_frac/d_frac are the fraction bits of 1.a and 1.d.
// quotient = Q * 4^(N/2-1) (N-2 fraction bits), unsigned in N+1 bits.
// rem_pos - rem_neg is the final remainder R_final in units of 2^-(N+4):
//     K*A * 4^(N/2) = 4 * Y * quotient + R_final   (K*A, Y in units 2^-(N+4))
// and |R_final| < 4, so |A/D - Q| < 4^-(N/2-1). Timing: purely
// combinational: prescaler, N/2 slice delays, one subtraction.
// The organisation follows the source design; operand format, the slice
// count and the converter are this design's choices.
module pr4_divider
  import div_pkg::*;
#(
  parameter int unsigned N = 32,
  localparam int unsigned FR = N + 4,
  localparam int unsigned M  = N / 2
) (
  input  logic [N-1:0]  a_frac,
  input  logic [N-1:0]  d_frac,
  output logic [N:0]    quotient,
  output logic [FR+1:0] rem_pos,
  output logic [FR+1:0] rem_neg
);
  logic [2:0]    k;
  logic [FR:0]   y, ka;
  logic [FR+1:0] f;
  logic [FR+1:0] rp [M+1];
  logic [FR+1:0] rn [M+1];
  logic [FR-1:0] sp [M];
  logic [FR-1:0] sn [M];
  pr4_qdigit_t   qd [M];
  logic [N:0]    qpos_vec, qneg_vec;

  prescaler #(.N(N)) u_pre (
    .a_frac (a_frac), .d_frac (d_frac), .k (k), .y (y), .f (f),
    .ka_pos (rp[0]), .ka_neg (rn[0]), .ka (ka)
  );

  for (genvar j = 0; j < M; j++) begin : g_slice
    pr4_slice #(.FR(FR)) u_slice (
      .r_pos (rp[j]), .r_neg (rn[j]), .y (y), .f (f),
      .q (qd[j]), .s_pos (sp[j]), .s_neg (sn[j])
    );
    assign rp[j+1] = {sp[j], 2'b00};
    assign rn[j+1] = {sn[j], 2'b00};
  end

  always_comb begin
    qpos_vec = '0;
    qneg_vec = '0;
    for (int j = 0; j < M; j++) begin
      if (qd[j].sign) qpos_vec[2*(M-1-j) +: 2] = qd[j].mag;
      else            qneg_vec[2*(M-1-j) +: 2] = qd[j].mag;
    end
  end

  quotient_converter #(.W(N+1)) u_conv (.pos(qpos_vec), .neg(qneg_vec), .q(quotient));

  assign rem_pos = rp[M];
  assign rem_neg = rn[M];

  initial assert (N >= 4 && N % 2 == 0) else $error("pr4_divider: N must be even and >= 4");
endmodule
