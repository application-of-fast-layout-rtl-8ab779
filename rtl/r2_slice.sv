// r2_slice: one row of the radix-2 borrow-save array divider.
//
// Computes S = R - q*D for one quotient digit q in {-1,0,1}. The partial
// remainder R holds N+3 borrow-save digits; bit b of r_pos/r_neg has weight
// 2^(b-N), so bits N+2, N+1, N are the digits r_-2, r_-1, r_0 that the head
// reads and bit N-i is digit r_i. The head picks q and produces the two top
// output digits; N tail cells (one per divisor fraction bit d_i) add the
// selected divisor bits carry-free. q_pos is also the +2^-N of the divisor
// complement (it enters as the lowest plus bit). S has N+2 digits
// (bits N+1..0); the caller shifts it one place left to form the next R.
// Purely combinational: delay is one head plus one tail cell per slice.
module r2_slice #(
  parameter int unsigned N = 32
) (
  input  logic [N+2:0] r_pos,
  input  logic [N+2:0] r_neg,
  input  logic [N-1:0] d_frac,    // d_frac[N-i] = d_i
  output logic         q_pos,
  output logic         q_neg,
  output logic [N+1:0] s_pos,
  output logic [N+1:0] s_neg
);
  r2_head u_head (
    .r_m2     ({r_pos[N+2], r_neg[N+2]}),
    .r_m1     ({r_pos[N+1], r_neg[N+1]}),
    .r_0      ({r_pos[N],   r_neg[N]}),
    .q_pos    (q_pos),
    .q_neg    (q_neg),
    .s_m1_pos (s_pos[N+1]),
    .s_m1_neg (s_neg[N+1]),
    .s_0_neg  (s_neg[N])
  );

  for (genvar b = 0; b < N; b++) begin : g_tail
    bs_tail u_tail (
      .r_pos    (r_pos[b]),
      .r_neg    (r_neg[b]),
      .d        (d_frac[b]),
      .q_pos    (q_pos),
      .q_neg    (q_neg),
      .s_up_pos (s_pos[b+1]),
      .s_neg    (s_neg[b])
    );
  end

  assign s_pos[0] = q_pos;
endmodule
