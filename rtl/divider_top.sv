// divider_top: the three combinational mantissa dividers side by side.
//
// Three array dividers for the same problem, Q = A/D with A, D in [1,2),
// built to compare how far the radix can be raised:
//   * r2_divider : radix 2, borrow-save remainder, no operand scaling,
//                  N slices, quotient digits in {-1,0,1};
//   * pr4_divider: pseudo radix 4, operands scaled so that the divisor is
//                  in [1, 9/8), N/2 slices, digits in {-3..3};
//   * r4_divider : true radix 4 (radix-4 signed-digit remainder), same
//                  scaling, N/2 slices, digits in {-2..2}.
//   * r2s_divider: radix 2 with the simpler scaling K = 3/4 when d_1 = 1,
//                  a two-digit head, N slices (the intermediate step
//                  between the radix-2 and pseudo-radix-4 dividers).
// They share nothing; each has its own operand and result ports. Results:
// r2_quotient and r2s_quotient = Q*2^(N-1); pr4_quotient and r4_quotient = Q*4^(N/2-1).
// The final partial remainders are brought out for checking. There is no
// clock: each divider is one combinational path. The choice of the three
// dividers follows the source design; placing them in one top is only a
// convenience of this design.
module divider_top
  import div_pkg::*;
#(
  parameter int unsigned N = 32,
  localparam int unsigned FR = N + 4,
  localparam int unsigned L  = FR / 2 + 1
) (
  input  logic [N-1:0]      r2_a_frac,
  input  logic [N-1:0]      r2_d_frac,
  output logic [N:0]        r2_quotient,
  output logic [N+2:0]      r2_rem_pos,
  output logic [N+2:0]      r2_rem_neg,
  input  logic [N-1:0]      pr4_a_frac,
  input  logic [N-1:0]      pr4_d_frac,
  output logic [N:0]        pr4_quotient,
  output logic [FR+1:0]     pr4_rem_pos,
  output logic [FR+1:0]     pr4_rem_neg,
  input  logic [N-1:0]      r4_a_frac,
  input  logic [N-1:0]      r4_d_frac,
  output logic [N:0]        r4_quotient,
  output logic [3*L-1:0]    r4_rem,
  input  logic [N-1:0]      r2s_a_frac,
  input  logic [N-1:0]      r2s_d_frac,
  output logic [N:0]        r2s_quotient,
  output logic [N+2:0]      r2s_rem_pos,
  output logic [N+2:0]      r2s_rem_neg
);
  r4_digit_t [L-1:0] r4_rem_d;

  r2_divider #(.N(N)) u_r2 (
    .a_frac (r2_a_frac), .d_frac (r2_d_frac), .quotient (r2_quotient),
    .rem_pos (r2_rem_pos), .rem_neg (r2_rem_neg)
  );

  pr4_divider #(.N(N)) u_pr4 (
    .a_frac (pr4_a_frac), .d_frac (pr4_d_frac), .quotient (pr4_quotient),
    .rem_pos (pr4_rem_pos), .rem_neg (pr4_rem_neg)
  );

  r4_divider #(.N(N)) u_r4 (
    .a_frac (r4_a_frac), .d_frac (r4_d_frac), .quotient (r4_quotient),
    .rem (r4_rem_d)
  );

  assign r4_rem = r4_rem_d;

  r2s_divider #(.N(N)) u_r2s (
    .a_frac (r2s_a_frac), .d_frac (r2s_d_frac), .quotient (r2s_quotient),
    .rem_pos (r2s_rem_pos), .rem_neg (r2s_rem_neg)
  );
endmodule
