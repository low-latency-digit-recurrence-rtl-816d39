// rsr_approx: Newton-Raphson approximation recurrence of the combined unit,
// evaluated as a digit recurrence overlapped with the digit-by-digit part.
//
// With p = p[j+1] and the residuals w[j], w[j+1] of the digit-by-digit part:
//   reciprocal : E[j+1] = 16 E[j] + p (2*4w[j]) - p^2 D[j]
//   rsqrt      : H[j+1] = 16 H[j] + p (2*4w[j]) + p w[j+1] - p^2 D[j]/2
// After g iterations E[g]/16^g = Q[g](2 - d Q[g]) and
// H[g]/16^g = P[g](3/2 - d P[g]^2/2): one Newton-Raphson step applied to the
// digit-by-digit result, which doubles its number of correct bits.
// Structure (per iteration): p x 2rw[j] (digit multiplexers on both residual
// vectors) and 16H in a 4-2 carry-save adder; -p^2 x (D or D/2, chosen by op)
// in a 3-2 adder; p x w[j+1], forced to zero for the reciprocal (the AND on
// the digit), in a second 4-2 adder. The units that complete the negated
// multiples go into the four free low bits of 16H's carry vector.
// Only an NE-bit window of E/H is kept in carry-save form: the bits leaving
// its top are handed to approx_conv as a radix-16 digit, and the part left
// behind keeps a bias of 2 units (the constant 2'b10 on top of the sum vector)
// so that every digit handed over is positive.
// Initial values: reciprocal E0 = Q0(2 - Q0 d) (2-d or 4-4d); rsqrt
// H0 = (P0/2)(3 - P0^2 d) ((3-d)/2 or 3-4d).
// The recurrences, the adder structure and the initial values follow the
// design description; window width, bias and bit alignment are this
// implementation's choice. Timing: registers change on load / iter; result is
// combinational from the registers.
module rsr_approx
  import rsr_pkg::*;
#(
  parameter int G    = G_APPROX,
  parameter int RWID = 4*G - 2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic            iter,
  input  op_e             op,       // operation (held for the whole run)
  input  logic [DF-1:0]   d,
  input  logic [1:0]      q0,       // Q0 / P0 (valid with load)
  input  digit_t          p,        // p[j+1]
  input  logic [WW-1:0]   ws,       // w[j]
  input  logic [WW-1:0]   wc,
  input  logic [WW-1:0]   wn_s,     // w[j+1]
  input  logic [WW-1:0]   wn_c,
  input  logic [WW-1:0]   dreg,     // D[j]
  output logic [RWID-1:0] result,   // rounded approximation, 2 integer bits
  output logic            ambig     // result cannot be rounded safely
);
  logic [L+1:0] hs, hc;            // E/H residual, sum and carry

  // ---------------- initial value ----------------
  logic [L+1:0] dL, h0;
  always_comb begin
    dL = (L+2)'(d) << (L - DF);
    if (op == OP_RECIP)
      h0 = (q0 == 2'd1) ? ((L+2)'(2) << L) - dL
                        : ((L+2)'(4) << L) - (dL << 2);
    else
      h0 = (q0 == 2'd1) ? (((L+2)'(3) << L) - dL) >> 1
                        : ((L+2)'(3) << L) - (dL << 2);
  end

  // ---------------- recurrence terms ----------------
  function automatic logic [NE-1:0] sext_w(input logic [WW-1:0] x);
    return NE'(signed'(x));
  endfunction

  // digit multiple of a vector: |p| * x, inverted for a negative digit
  function automatic logic [NE-1:0] dmul(input digit_t dg, input logic [NE-1:0] x);
    logic [NE-1:0] m;
    unique case (dg)
      3'sd1, -3'sd1: m = x;
      3'sd2, -3'sd2: m = x << 1;
      default:       m = '0;
    endcase
    return (dg < 0) ? ~m : m;
  endfunction

  digit_t        pa;                 // digit gated by op (AND gate)
  logic [NE-1:0] t1s, t1c, t2, t3s, t3c, dsel, p2d, h16s, h16c;
  logic [3:0]    ncor;
  always_comb begin
    pa   = (op == OP_RSQRT) ? p : 3'sd0;
    // p * 2rw[j]: w has F fraction bits, E has L = F+1, so 8w is a shift by 4
    t1s  = dmul(p, sext_w(ws) << 4);
    t1c  = dmul(p, sext_w(wc) << 4);
    // -p^2 * D (reciprocal) or -p^2 * D/2 (rsqrt)
    dsel = (op == OP_RSQRT) ? sext_w(dreg) : (sext_w(dreg) << 1);
    unique case (p)
      3'sd1, -3'sd1: p2d = dsel;
      3'sd2, -3'sd2: p2d = dsel << 2;
      default:       p2d = '0;
    endcase
    t2   = (p != 0) ? ~p2d : '0;
    // p * w[j+1] (rsqrt only)
    t3s  = dmul(pa, sext_w(wn_s) << 1);
    t3c  = dmul(pa, sext_w(wn_c) << 1);
    ncor = 4'((p < 0) ? 2 : 0) + 4'((p != 0) ? 1 : 0) + 4'((pa < 0) ? 2 : 0);
    h16s = {1'b0, hs, 4'b0000};
    h16c = {1'b0, hc, ncor};
  end

  logic [NE-1:0] s1, c1, s2, c2, s3, c3;
  csa42 #(.W(NE)) u_csa_a (.a(t1s), .b(t1c), .x(h16s), .y(h16c),
                           .cin0(1'b0), .cin1(1'b0), .s(s1), .c(c1));
  csa32 #(.W(NE)) u_csa_b (.a(s1), .b(c1), .x(t2), .cin(1'b0), .s(s2), .c(c2));
  csa42 #(.W(NE)) u_csa_c (.a(s2), .b(c2), .x(t3s), .y(t3c),
                           .cin0(1'b0), .cin1(1'b0), .s(s3), .c(c3));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hs <= '0; hc <= '0;
    end else if (load) begin
      hs <= h0; hc <= '0;
    end else if (iter) begin
      hs <= {2'b10, s3[L-1:0]};
      hc <= {2'b00, c3[L-1:0]};
    end
  end

  approx_conv #(.G(G), .RWID(RWID)) u_conv (
    .clk(clk), .rst_n(rst_n), .init(load), .step(iter),
    .es(s3[L+6:L]), .ec(c3[L+6:L]),
    .rs(hs[L+1:L-4]), .rc(hc[L+1:L-4]),
    .result(result), .pend_o(), .ambig(ambig)
  );
endmodule
