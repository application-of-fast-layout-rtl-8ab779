// pr4_slice: one row of the pseudo-radix-4 array divider.
//
// Computes S = R - q*Y for one quotient digit q in {-3..3}. R holds FR+2
// borrow-save digits, bit b weighing 2^(b-FR): bits FR+1, FR, FR-1 are the
// digits r_-1, r_0, r_1 read by the head, bit FR-i is digit r_i. The head
// picks q; FR-1 tail cells (digits r_2..r_FR) add the selected, possibly
// complemented multiple of Y. The digit sign enters as the lowest plus bit
// (the +2^-FR of the complement). S has FR digits (bits FR-1..0), two
// fewer at the top than R; the caller shifts it two places left.
// y is Y (bit FR = 1) and f is 3Y. Purely combinational.
module pr4_slice
  import div_pkg::*;
#(
  parameter int unsigned FR = 36
) (
  input  logic [FR+1:0] r_pos,
  input  logic [FR+1:0] r_neg,
  input  logic [FR:0]   y,
  input  logic [FR+1:0] f,
  output pr4_qdigit_t   q,
  output logic [FR-1:0] s_pos,
  output logic [FR-1:0] s_neg
);
  pr4_head u_head (
    .r_m1    ({r_pos[FR+1], r_neg[FR+1]}),
    .r_0     ({r_pos[FR],   r_neg[FR]}),
    .r_1     ({r_pos[FR-1], r_neg[FR-1]}),
    .q       (q),
    .s_1_neg (s_neg[FR-1])
  );

  for (genvar b = 0; b <= FR - 2; b++) begin : g_tail
    logic y_lo;
    if (b == 0) begin : g_lsb
      assign y_lo = 1'b0;
    end else begin : g_mid
      assign y_lo = y[b-1];
    end
    pr4_tail u_tail (
      .r_pos    (r_pos[b]),
      .r_neg    (r_neg[b]),
      .y_i      (y[b]),
      .y_i1     (y_lo),
      .f_i      (f[b]),
      .q        (q),
      .s_up_pos (s_pos[b+1]),
      .s_neg    (s_neg[b])
    );
  end

  assign s_pos[0] = q.sign;
endmodule
