// r4_slice: one row of the radix-4 array divider.
//
// Computes S = R - q*Y for one quotient digit q in {-2..2}, all in radix-4
// signed digits. R has L digits, r[L-1] being r_1 (weight 1) and r[0] the
// least significant (weight 4^-(L-1)). The head reads r_1 and r_2; L-2 tail
// cells handle r[L-3..0]. Output digit s[j] = (s_pos - 2*s_neg) of tail j
// plus the carry s_up_pp of tail j-1; the lowest carry input is ~add, the
// +1 that completes the complement. S has L-1 digits with the weights of
// r[L-2..0]; the caller shifts it one digit left. y is Y in binary with
// FR = 2*(L-1) fraction bits: its radix-4 digit at position j is
// y[2j+1:2j] and that of 2Y is y[2j:2j-1]. Purely combinational.
module r4_slice
  import div_pkg::*;
#(
  parameter int unsigned L = 19,
  localparam int unsigned FR = 2 * (L - 1)
) (
  input  r4_digit_t [L-1:0] r,
  input  logic [FR:0]       y,
  output r4_qdigit_t        q,
  output r4_digit_t [L-2:0] s
);
  logic [L-2:0] sp, sn;
  logic [L-2:0] cpp;   // cpp[j+1] = carry out of tail j into digit j+1

  r4_head u_head (.r_1(r[L-1]), .r_2(r[L-2]), .q(q), .s_1_pos(sp[L-2]), .s_1_neg(sn[L-2]));

  for (genvar j = 0; j <= L - 3; j++) begin : g_tail
    logic [1:0] y2d;
    if (j == 0) begin : g_lsb
      assign y2d = {y[0], 1'b0};
    end else begin : g_mid
      assign y2d = y[2*j -: 2];
    end
    r4_tail u_tail (
      .r (r[j]), .y_d (y[2*j+1 -: 2]), .y2_d (y2d), .q (q),
      .s_up_pp (cpp[j+1]), .s_pos (sp[j]), .s_neg (sn[j])
    );
  end

  assign cpp[0] = ~q.add;

  for (genvar j = 0; j <= L - 2; j++) begin : g_out
    assign s[j] = '{n: sn[j], p: sp[j], pp: cpp[j]};
  end
endmodule
