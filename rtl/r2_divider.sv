// r2_divider: combinational radix-2 borrow-save array divider without
// operand scaling.
//
// Divides two mantissas A = 1.a_1..a_N and D = 1.d_1..d_N. The first
// partial remainder is A itself. Each of the SLICES rows (r2_slice) selects
// one quotient digit q_j in {-1,0,1} from the sign of the three leading
// remainder digits and computes R(j+1) = 2*(R(j) - q_j*D) in borrow-save
// form, so no carry runs along a row; the remainder stays in (-2D, 2D).
// The quotient digits q_j (weight 2^-j) are collected as a positive and a
// negative bit vector and turned into binary by the quotient converter.
//
// Interface: a_frac/d_frac are the fraction bits (MSB = a_1). quotient is
// Q * 2^(SLICES-1), unsigned in N+1 bits, with
//     A * 2^SLICES = 2 * D * quotient + R_final          (all scaled by 2^N)
// where R_final = rem_pos - rem_neg, weight 2^-N per unit, |R_final| < 2D.
// So |A/D - Q| < 2^-(SLICES-1). Timing: purely combinational; the delay
// grows as SLICES head+tail delays plus one N-bit subtraction.
// The slice structure and digit selection follow the source design; the
// operand format, the slice count (one per quotient digit) and the
// converter are this design's choices.
module r2_divider #(
  parameter int unsigned N      = 32,
  parameter int unsigned SLICES = N
) (
  input  logic [N-1:0] a_frac,
  input  logic [N-1:0] d_frac,
  output logic [N:0]   quotient,
  output logic [N+2:0] rem_pos,
  output logic [N+2:0] rem_neg
);
  logic [N+2:0] rp [SLICES+1];
  logic [N+2:0] rn [SLICES+1];
  logic [N+1:0] sp [SLICES];
  logic [N+1:0] sn [SLICES];
  logic [SLICES-1:0] qp, qn;
  logic [N:0] qpos_vec, qneg_vec;

  assign rp[0] = {2'b00, 1'b1, a_frac};
  assign rn[0] = '0;

  for (genvar j = 0; j < SLICES; j++) begin : g_slice
    r2_slice #(.N(N)) u_slice (
      .r_pos  (rp[j]),
      .r_neg  (rn[j]),
      .d_frac (d_frac),
      .q_pos  (qp[SLICES-1-j]),
      .q_neg  (qn[SLICES-1-j]),
      .s_pos  (sp[j]),
      .s_neg  (sn[j])
    );
    assign rp[j+1] = {sp[j], 1'b0};
    assign rn[j+1] = {sn[j], 1'b0};
  end

  assign qpos_vec = (N+1)'(qp);
  assign qneg_vec = (N+1)'(qn);

  quotient_converter #(.W(N+1)) u_conv (
    .pos (qpos_vec),
    .neg (qneg_vec),
    .q   (quotient)
  );

  assign rem_pos = rp[SLICES];
  assign rem_neg = rn[SLICES];

  initial assert (SLICES >= 1 && SLICES <= N)
    else $error("r2_divider: SLICES must be in 1..N");
endmodule
