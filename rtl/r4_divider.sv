// r4_divider: combinational radix-4 array divider with operand scaling.
//
// Unlike the pseudo-radix-4 divider, remainder digits are true radix-4
// signed digits in {-2..2}, each on three bits (-2n + p + pp), and the
// quotient digits are in {-2..2}, so only Y and 2Y are needed (no 3Y). The
// prescaler brings the divisor to Y = K*D in [1, 9/8); K*A, carry
// propagated and Booth recoded (digit = -2*b(2i+1) + b(2i) + b(2i-1)),
// is the first partial remainder. Each of the N/2 slices selects q_j
// (weight 4^-j) from the two leading remainder digits and computes
// R(j+1) = 4*(R(j) - q_j*Y). The digit magnitudes form a positive and a
// negative binary vector, subtracted by the quotient converter.
//
// Interface: a_frac/d_frac are the fraction bits of 1.a and 1.d.
// quotient = Q * 4^(N/2-1), unsigned in N+1 bits. rem holds the final
// remainder digits (L = N/2+3 digits, lowest weight 2^-(N+4)); with
// R_final their value in units of 2^-(N+4):
//     K*A * 4^(N/2) = 4 * Y * quotient + R_final ,  |R_final| < 8/3 * 2^(N+4)
// so |A/D - Q| < 4^-(N/2-1). Timing: purely combinational.
// Slice structure and selection follow the source design; the digit codes,
// Booth recoding of K*A and the converter are this design's choices.
module r4_divider
  import div_pkg::*;
#(
  parameter int unsigned N = 32,
  localparam int unsigned FR = N + 4,
  localparam int unsigned L  = FR / 2 + 1,
  localparam int unsigned M  = N / 2
) (
  input  logic [N-1:0]      a_frac,
  input  logic [N-1:0]      d_frac,
  output logic [N:0]        quotient,
  output r4_digit_t [L-1:0] rem
);
  logic [2:0]    k;
  logic [FR:0]   y, ka;
  logic [FR+1:0] f_unused, kap_unused, kan_unused;
  r4_digit_t [L-1:0] r [M+1];
  r4_digit_t [L-2:0] s [M];
  r4_qdigit_t        qd [M];
  logic [N:0]        qpos_vec, qneg_vec;

  prescaler #(.N(N)) u_pre (
    .a_frac (a_frac), .d_frac (d_frac), .k (k), .y (y), .f (f_unused),
    .ka_pos (kap_unused), .ka_neg (kan_unused), .ka (ka)
  );

  // Booth recoding of K*A (K*A < 2, so the bit above the top pair is 0)
  logic [FR+1:0] ka_ext;
  assign ka_ext = {1'b0, ka};
  for (genvar i = 0; i < L; i++) begin : g_booth
    if (i == 0) begin : g_lsb
      assign r[0][0] = '{n: ka_ext[1], p: ka_ext[0], pp: 1'b0};
    end else begin : g_mid
      assign r[0][i] = '{n: ka_ext[2*i+1], p: ka_ext[2*i], pp: ka_ext[2*i-1]};
    end
  end

  for (genvar j = 0; j < M; j++) begin : g_slice
    r4_slice #(.L(L)) u_slice (.r (r[j]), .y (y), .q (qd[j]), .s (s[j]));
    assign r[j+1] = {s[j], 3'b000};
  end

  always_comb begin
    qpos_vec = '0;
    qneg_vec = '0;
    for (int j = 0; j < M; j++) begin
      if (qd[j].add) qneg_vec[2*(M-1-j) +: 2] = {qd[j].u2, qd[j].u1};
      else           qpos_vec[2*(M-1-j) +: 2] = {qd[j].u2, qd[j].u1};
    end
  end

  quotient_converter #(.W(N+1)) u_conv (.pos(qpos_vec), .neg(qneg_vec), .q(quotient));

  assign rem = r[M];

  initial assert (N >= 4 && N % 2 == 0) else $error("r4_divider: N must be even and >= 4");
endmodule
