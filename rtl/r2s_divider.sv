// r2s_divider: combinational radix-2 borrow-save array divider with
// operand scaling.
//
// Both mantissas are multiplied by K = 3/4 when the first divisor fraction
// bit d_1 is set, else by K = 1, which leaves the quotient unchanged and
// brings the divisor to Y = K*D in [1, 1.5), so that Y's first two bits are
// the constants 1.0. The head of each slice then reads only two remainder
// digits (r2s_head) and the remainder stays in (-2, 2) by construction.
// The first partial remainder K*A = A - A/4 is written directly in
// borrow-save form (A as plus bits, A/4 as minus bits); Y is formed by one
// subtraction. Each of the N slices produces one digit q_j in {-1,0,1}
// (weight 2^-j) and computes R(j+1) = 2*(R(j) - q_j*Y) with the borrow-save
// tail cells of the unscaled radix-2 divider. The digits are converted to
// binary by the quotient converter.
//
// Interface: quotient = Q * 2^(N-1), unsigned in N+1 bits. rem_pos -
// rem_neg is R_final in units of 2^-(N+2), |R_final| < 2 * 2^(N+2), with
//     K*A * 2^N = 2 * Y * quotient + R_final   (K*A, Y in units 2^-(N+2))
// so |A/D - Q| < 2^-(N-1). Timing: purely combinational.
// Scaling rule, head table and slice structure follow the source design;
// operand format, fraction width N+2 and the converter are this design's
// choices.
module r2s_divider #(
  parameter int unsigned N = 32,
  localparam int unsigned FR = N + 2
) (
  input  logic [N-1:0] a_frac,
  input  logic [N-1:0] d_frac,
  output logic [N:0]   quotient,
  output logic [FR:0]  rem_pos,
  output logic [FR:0]  rem_neg
);
  logic [FR:0] av, dv, y;
  logic [FR:0] rp [N+1];
  logic [FR:0] rn [N+1];
  logic [N-1:0] qp, qn;

  assign av = {1'b1, a_frac, 2'b00};
  assign dv = {1'b1, d_frac, 2'b00};
  // range reduction: K = 3/4 when d_1 = 1
  assign y     = d_frac[N-1] ? dv - (dv >> 2) : dv;
  assign rp[0] = av;
  assign rn[0] = d_frac[N-1] ? (av >> 2) : '0;

  for (genvar j = 0; j < N; j++) begin : g_slice
    logic [FR-1:0] sp, sn;
    r2s_head u_head (
      .r_0     ({rp[j][FR],   rn[j][FR]}),
      .r_1     ({rp[j][FR-1], rn[j][FR-1]}),
      .q_pos   (qp[N-1-j]),
      .q_neg   (qn[N-1-j]),
      .s_1_neg (sn[FR-1])
    );
    for (genvar b = 0; b <= FR - 2; b++) begin : g_tail
      bs_tail u_tail (
        .r_pos (rp[j][b]), .r_neg (rn[j][b]), .d (y[b]),
        .q_pos (qp[N-1-j]), .q_neg (qn[N-1-j]),
        .s_up_pos (sp[b+1]), .s_neg (sn[b])
      );
    end
    assign sp[0] = qp[N-1-j];
    assign rp[j+1] = {sp, 1'b0};
    assign rn[j+1] = {sn, 1'b0};
  end

  quotient_converter #(.W(N+1)) u_conv (.pos({1'b0, qp}), .neg({1'b0, qn}), .q(quotient));

  assign rem_pos = rp[N];
  assign rem_neg = rn[N];
endmodule
