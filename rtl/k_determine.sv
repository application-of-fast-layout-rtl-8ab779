// k_determine: choice of the divisor scaling factor K.
//
// The two radix-4 dividers scale both operands by K so that the divisor
// Y = K*D lies in [1, 9/8); the quotient is unchanged. K is 1 - k/16 with
// k in 0..7 and depends only on the leading five fraction bits of D,
// because every interval bound is a multiple of 1/32:
//     D in [1, 9/8)     K = 1        D in [11/8, 6/4)   K = 0.75
//     D in [9/8, 19/16) K = 0.9375   D in [6/4, 13/8)   K = 0.6875
//     D in [19/16, 5/4) K = 0.875    D in [13/8, 57/32) K = 0.625
//     D in [5/4, 11/8)  K = 0.8125   D in [57/32, 2)    K = 0.5625
// The intervals and K values are those of the source design; the 3-bit
// code k is this design's choice. Purely combinational.
module k_determine (
  input  logic [4:0] d_top,   // d_1..d_5, d_top[4] = d_1
  output logic [2:0] k        // K = 1 - k/16
);
  always_comb begin
    if      (d_top < 5'd4)  k = 3'd0;   // D < 1 + 4/32  = 9/8
    else if (d_top < 5'd6)  k = 3'd1;   // D < 1 + 6/32  = 19/16
    else if (d_top < 5'd8)  k = 3'd2;   // D < 1 + 8/32  = 5/4
    else if (d_top < 5'd12) k = 3'd3;   // D < 1 + 12/32 = 11/8
    else if (d_top < 5'd16) k = 3'd4;   // D < 1 + 16/32 = 6/4
    else if (d_top < 5'd20) k = 3'd5;   // D < 1 + 20/32 = 13/8
    else if (d_top < 5'd25) k = 3'd6;   // D < 1 + 25/32 = 57/32
    else                    k = 3'd7;
  end
endmodule
