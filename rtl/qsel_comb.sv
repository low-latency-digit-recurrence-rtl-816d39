// qsel_comb: radix-4 digit selection shared by reciprocal and reciprocal
// square root (the single selection function of the combined unit).
//
// p = SEL(y, D): y is the estimate of 4w[j] (carry-save sum truncated to
// 4 fraction bits, 7-bit two's complement, units of 1/16) and dhat is the
// estimate of D[j] (8 bits, units of 1/128, value in [0,2)). D is reduced to
// the interval index i = floor(32*D), saturated to 16..31, and the digit is
//   p = 2 if y >= m2(i); 1 if y >= m1(i); 0 if y >= m0(i); -1 if y >= m-1(i);
//   -2 otherwise.
// The selection constants (scaled by 16) are the published table, with one
// entry changed: m-1(26) is -20 (the printed value -21 lets the reciprocal
// square-root recurrence leave its convergence bound for d near 0.41).
// Combinational.
module qsel_comb
  import rsr_pkg::*;
(
  input  logic signed [6:0] y,
  input  logic        [7:0] dhat,
  output digit_t            p
);
  typedef logic signed [6:0] m_t;
  localparam m_t MM1 [16] = '{-13,-14,-14,-15,-16,-17,-17,-18,
                              -18,-19,-20,-21,-21,-23,-24,-24};
  localparam m_t M0  [16] = '{ -5, -5, -5, -6, -6, -6, -7, -7,
                               -7, -8, -8, -8, -9, -9, -9,-10};
  localparam m_t M1  [16] = '{  3,  4,  4,  4,  4,  4,  4,  5,
                                7,  7,  7,  7,  8,  8,  8,  8};
  localparam m_t M2  [16] = '{ 12, 13, 14, 14, 15, 15, 16, 17,
                               18, 18, 19, 19, 22, 22, 22, 22};

  logic [3:0] k;   // i - 16
  always_comb begin
    if (dhat[7])       k = 4'd15;          // D >= 1: saturate to 31/32
    else if (!dhat[6]) k = 4'd0;           // D < 1/2: saturate to 16/32
    else               k = dhat[5:2];
    if      (y >= M2[k])  p = 3'sd2;
    else if (y >= M1[k])  p = 3'sd1;
    else if (y >= M0[k])  p = 3'sd0;
    else if (y >= MM1[k]) p = -3'sd1;
    else                  p = -3'sd2;
  end
endmodule
