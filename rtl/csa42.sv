// csa42: W-bit 4-2 carry-save adder built from two rows of 3-2 adders.
// s + c == a + b + x + y + cin0 + cin1 (mod 2^W). The two injected units
// enter the free least significant positions of the two carry vectors.
// Purely combinational; two full-adder delays.
module csa42 #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin0,
  input  logic         cin1,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] s1, c1;
  csa32 #(.W(W)) u_row1 (.a(a),  .b(b),  .x(x), .cin(cin0), .s(s1), .c(c1));
  csa32 #(.W(W)) u_row2 (.a(s1), .b(c1), .x(y), .cin(cin1), .s(s),  .c(c));
endmodule
