// rsr_pkg: shared constants and types of the radix-4 reciprocal / reciprocal
// square-root units.
//
// Fixed-point formats (all two's complement unless noted):
//   d       : operand significand, DF fraction bits, unsigned, d in [1/4,1)
//   w, D    : residual and D[j] = d*P[j], IW integer bits (sign included)
//             and F fraction bits
//   C       : C[j] = (1/2) 4^-(j+1) d, F fraction bits, unsigned
//   E / H   : approximation residual, L fraction bits, kept in carry-save
//             form in an NE-bit window (mod 2^NE arithmetic)
//   result  : RW bits, 2 integer bits and 52 fraction bits (value in (1,2])
// The radix (4), the digit set {-2..2}, the iteration counts 14 and 28 and the
// 53-bit double-precision significand follow the design description; the
// guard widths F, IW and L are this implementation's choice.
package rsr_pkg;
  localparam int DF  = 54;          // fraction bits of the operand d
  localparam int F   = 58;          // fraction bits of w, D, C
  localparam int IW  = 8;           // integer bits (incl. sign) of w and D
  localparam int WW  = IW + F;      // width of the residual / D datapath
  localparam int L   = F + 1;       // fraction bits of the E/H recurrence
  localparam int NE  = L + 7;       // E/H carry-save window width
  localparam int RW  = 54;          // result width: 2 integer + 52 fraction
  localparam int G_APPROX = 14;     // iterations, overlapped NR mode
  localparam int G_EXACT  = 28;     // iterations, digit-by-digit only mode

  // radix-4 signed digit in {-2,-1,0,1,2}
  typedef logic signed [2:0] digit_t;

  typedef enum logic {OP_RECIP = 1'b0, OP_RSQRT = 1'b1} op_e;
endpackage
