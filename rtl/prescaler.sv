// prescaler: operand scaling for the pseudo-radix-4 and radix-4 dividers.
//
// Computes, for the scaling factor K = 1 - k/16 chosen by k_determine:
//   * K*D and K*A in borrow-save form, each as X1 + X2 - X3 of shifted
//     operand copies picked by multiplexers and summed by one carry-free
//     layer of borrow-save cells (X1 in {V, V/2}, X2 and X3 in
//     {0, V/16, V/8, V/4}; e.g. 13/16 = 1 + 1/16 - 1/4, 11/16 = 1/2 + 1/4 - 1/16);
//   * Y = K*D in binary (carry-propagate subtraction of the two BS vectors);
//   * F = 3*Y in binary, from the same BS vectors: P + 2P - M - 2M is
//     reduced by two full-adder layers and one carry-propagate adder, in
//     parallel with Y;
//   * K*A in binary (used by the radix-4 divider) as well as in BS form
//     (the first partial remainder of the pseudo-radix-4 divider).
// Fixed point: every output has FR = N+4 fraction bits, which keeps K*D and
// K*A exact (K has four fraction bits). Bit b has weight 2^(b-FR).
// The data flow (scaling factor logic, multiplexed shifted operands, one
// adder layer, two more adder layers for 3Y, carry propagation in parallel)
// follows the source design; the exact multiplexer inputs and the use of
// borrow-save rather than carry-save cells are this design's choice.
// Purely combinational.
module prescaler #(
  parameter int unsigned N = 32,
  localparam int unsigned FR = N + 4
) (
  input  logic [N-1:0] a_frac,
  input  logic [N-1:0] d_frac,
  output logic [2:0]   k,
  output logic [FR:0]  y,        // K*D, in [1, 9/8)
  output logic [FR+1:0] f,       // 3*K*D
  output logic [FR+1:0] ka_pos,  // K*A, borrow-save plus bits
  output logic [FR+1:0] ka_neg,  // K*A, borrow-save minus bits
  output logic [FR:0]  ka        // K*A, binary, in [9/16, 2)
);
  localparam int unsigned W = FR + 3;   // two's complement width for 3Y

  logic [FR:0] av, dv;
  logic [FR:0] a1, a2, a3, d1, d2, d3;
  logic [FR+1:0] kd_pos, kd_neg;

  assign av = {1'b1, a_frac, 4'b0000};
  assign dv = {1'b1, d_frac, 4'b0000};

  // leading five divisor fraction bits (zero-extended below 5-bit operands)
  logic [4:0] d_top;
  if (N >= 5) begin : g_dtop
    assign d_top = d_frac[N-1 -: 5];
  end else begin : g_dtop_short
    assign d_top = {d_frac, (5-N)'(0)};
  end

  k_determine u_kdet (.d_top(d_top), .k(k));

  // operand copy selection: value = X1 + X2 - X3
  function automatic logic [FR:0] sel_x1(logic [2:0] kk, logic [FR:0] v);
    return (kk >= 3'd5) ? (v >> 1) : v;
  endfunction
  function automatic logic [FR:0] sel_x2(logic [2:0] kk, logic [FR:0] v);
    case (kk)
      3'd3, 3'd7: return v >> 4;
      3'd5:       return v >> 2;
      3'd6:       return v >> 3;
      default:    return '0;
    endcase
  endfunction
  function automatic logic [FR:0] sel_x3(logic [2:0] kk, logic [FR:0] v);
    case (kk)
      3'd1, 3'd5: return v >> 4;
      3'd2:       return v >> 3;
      3'd3, 3'd4: return v >> 2;
      default:    return '0;
    endcase
  endfunction

  always_comb begin
    a1 = sel_x1(k, av); a2 = sel_x2(k, av); a3 = sel_x3(k, av);
    d1 = sel_x1(k, dv); d2 = sel_x2(k, dv); d3 = sel_x3(k, dv);
  end

  // one layer of borrow-save cells: (X1 - X3) + X2, carry-free
  for (genvar b = 0; b <= FR; b++) begin : g_bs
    bs_tail u_bs_d (.r_pos(d1[b]), .r_neg(d3[b]), .d(d2[b]), .q_pos(1'b0), .q_neg(1'b1),
                    .s_up_pos(kd_pos[b+1]), .s_neg(kd_neg[b]));
    bs_tail u_bs_a (.r_pos(a1[b]), .r_neg(a3[b]), .d(a2[b]), .q_pos(1'b0), .q_neg(1'b1),
                    .s_up_pos(ka_pos[b+1]), .s_neg(ka_neg[b]));
  end
  assign kd_pos[0] = 1'b0;
  assign ka_pos[0] = 1'b0;
  assign kd_neg[FR+1] = 1'b0;
  assign ka_neg[FR+1] = 1'b0;

  // carry propagation: Y and K*A
  logic [FR+1:0] y_full, ka_full;
  always_comb begin
    y_full  = kd_pos - kd_neg;
    ka_full = ka_pos - ka_neg;
    y  = y_full[FR:0];
    ka = ka_full[FR:0];
  end

  // 3*K*D = P + 2P + ~M + ~2M + 2  (mod 2^W): two full-adder layers, then
  // one carry-propagate adder
  logic [W-1:0] op_p, op_2p, op_nm, op_n2m, s1, c1, s2, c2, f_full;
  always_comb begin
    op_p   = W'(kd_pos);
    op_2p  = W'(kd_pos) << 1;
    op_nm  = ~W'(kd_neg);
    op_n2m = ~(W'(kd_neg) << 1);
    s1 = op_p ^ op_2p ^ op_nm;
    c1 = ((op_p & op_2p) | (op_p & op_nm) | (op_2p & op_nm)) << 1;
    s2 = s1 ^ c1 ^ op_n2m;
    c2 = ((s1 & c1) | (s1 & op_n2m) | (c1 & op_n2m)) << 1;
    f_full = s2 + c2 + W'(2);
    f = f_full[FR+1:0];
  end

  initial assert (N >= 1) else $error("prescaler: N must be at least 1");
endmodule
