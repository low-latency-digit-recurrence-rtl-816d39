// qsel_recip: radix-4 quotient-digit selection of the reciprocal-only unit.
//
// q = k if m_k(i) <= y < m_k+1(i), with y the estimate of 4w[j] (carry-save
// sum truncated to 4 fraction bits, 7-bit two's complement, units of 1/16)
// and i = 16*d truncated to 4 fraction bits (8..15; the input di is i-8,
// i.e. bits 2^-2..2^-4 of the normalised divisor d in [1/2,1)).
// The selection constants are the published radix-4 table. Combinational.
module qsel_recip
  import rsr_pkg::*;
(
  input  logic signed [6:0] y,
  input  logic        [2:0] di,
  output digit_t            q
);
  typedef logic signed [6:0] m_t;
  localparam m_t M2  [8] = '{ 12, 14, 15, 16, 18, 20, 20, 24};
  localparam m_t M1  [8] = '{  4,  4,  4,  4,  6,  6,  8,  8};
  localparam m_t M0  [8] = '{ -4, -6, -6, -6, -8, -8, -8, -8};
  localparam m_t MM1 [8] = '{-13,-15,-16,-18,-20,-20,-22,-24};

  always_comb begin
    if      (y >= M2[di])  q = 3'sd2;
    else if (y >= M1[di])  q = 3'sd1;
    else if (y >= M0[di])  q = 3'sd0;
    else if (y >= MM1[di]) q = -3'sd1;
    else                   q = -3'sd2;
  end
endmodule
