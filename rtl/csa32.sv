// csa32: W-bit 3-2 carry-save adder (a row of full adders).
// Adds three vectors into a sum vector and a carry vector such that
// s + c == a + b + x (mod 2^W). The carry vector is shifted left by one and
// its free least significant bit takes cin, so one extra unit can be added
// at no cost (used for the +1 of a two's complement negation).
// Purely combinational.
module csa32 #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] x,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] maj;
  always_comb begin
    s   = a ^ b ^ x;
    maj = (a & b) | (a & x) | (b & x);
    c   = {maj[W-2:0], cin};
  end
endmodule
