// rsr_dbd: digit-by-digit datapath of the combined reciprocal / reciprocal
// square-root unit (radix 4, digits {-2..2}, residual in carry-save form).
//
// Recurrences (op = reciprocal uses C = 0, so D stays equal to d):
//   w[j+1] = 4w[j] - p D[j] - p^2 C[j]      (4-2 carry-save adder)
//   D[j+1] = D[j] + 2p C[j]                 (carry-propagate adder)
//   C[j+1] = C[j] / 4                       (right shift by 2)
//   p[j+2] = SEL(4w[j+1], D[j+1])           (qsel_comb)
// The digit multiples are plain selections (digit multiplexers); a negative
// multiple is the bit inverse plus one unit, and the (at most two) units go
// into the two free low bits of the shifted residual 4ws.
// The selection works on estimates: a 7-bit short adder over the leading bits
// of the residual vectors, and an 8-bit short adder over the leading bits of
// D[j] and 2pC[j], which runs beside the long D adder.
// Initialisation (load), from the operand d in [1/4,1):
//   reciprocal: Q0 = 1 if d >= 3/4 else 2,  w0 = 1 - Q0 d,  D0 = d, C0 = 0
//   rsqrt     : P0 = 1 if d >= 1/2 else 2,  w0 = (1 - P0^2 d)/2,
//               D0 = P0 d, C0 = d/8
// w0 is formed in carry-save form as (const + ~X) + one unit in the carry
// vector, so no adder is needed; the first digit p1 is selected in the same
// cycle. The recurrences, the initial values and the estimate widths follow
// the design description; the number formats (rsr_pkg) and the carry-save
// form of w0 are this implementation's choice.
// Timing: load and iter act on the clock edge; p, the residual and D are
// registered outputs, wn_s/wn_c (w[j+1]) are combinational for the
// approximation datapath.
module rsr_dbd
  import rsr_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,      // initialisation cycle
  input  logic           iter,      // one recurrence step
  input  op_e            op,        // operation (valid with load)
  input  logic [DF-1:0]  d,         // operand, d * 2^DF (valid with load)
  output digit_t         p,         // current digit p[j+1]
  output logic [1:0]     q0,        // integer part of the start value
  output logic [WW-1:0]  ws,        // residual w[j], sum vector
  output logic [WW-1:0]  wc,        // residual w[j], carry vector
  output logic [WW-1:0]  wn_s,      // w[j+1], sum vector (combinational)
  output logic [WW-1:0]  wn_c,      // w[j+1], carry vector (combinational)
  output logic [WW-1:0]  dreg,      // D[j]
  output logic           res_neg,   // sign of the residual in ws/wc
  output logic           res_zero   // residual in ws/wc is zero
);
  localparam logic [WW-1:0] ONE  = WW'(1) << F;
  localparam logic [WW-1:0] HALF = WW'(1) << (F-1);

  logic [F-1:0]  creg;
  logic [1:0]    q0_r;

  // ---------------- initial values ----------------
  logic [WW-1:0] dF, x0, ws0, wc0, d0;
  logic [F-1:0]  c0;
  logic [1:0]    q0_n;
  always_comb begin
    dF = WW'(d) << (F - DF);
    if (op == OP_RECIP) begin
      q0_n = (d[DF-1] && d[DF-2]) ? 2'd1 : 2'd2;
      x0   = (q0_n == 2'd1) ? dF : (dF << 1);             // Q0*d
      ws0  = ONE + ~x0;
      d0   = dF;
      c0   = '0;
    end else begin
      q0_n = d[DF-1] ? 2'd1 : 2'd2;
      x0   = (q0_n == 2'd1) ? (dF >> 1) : (dF << 1);      // P0^2*d/2
      ws0  = HALF + ~x0;
      d0   = (q0_n == 2'd1) ? dF : (dF << 1);             // P0*d
      c0   = F'(dF >> 3);
    end
    wc0 = WW'(1);
  end

  // ---------------- recurrence ----------------
  logic [WW-1:0] pd, negpd, p2c, negp2c, rws, rwc, c2p, dnext, cw;
  logic [1:0]    ncor;
  always_comb begin
    cw = WW'(creg);
    unique case (p)
      3'sd1, -3'sd1: pd = dreg;
      3'sd2, -3'sd2: pd = dreg << 1;
      default:       pd = '0;
    endcase
    negpd = (p > 0) ? ~pd : pd;                          // -p*D (minus a unit)
    unique case (p)
      3'sd1, -3'sd1: p2c = cw;
      3'sd2, -3'sd2: p2c = cw << 2;
      default:       p2c = '0;
    endcase
    negp2c = (p != 0) ? ~p2c : '0;                       // -p^2*C (minus a unit)
    ncor   = 2'((p > 0) ? 1 : 0) + 2'((p != 0) ? 1 : 0);
    rws    = {ws[WW-3:0], ncor};                         // 4ws plus corrections
    rwc    = {wc[WW-3:0], 2'b00};                        // 4wc
    // 2pC in two's complement
    unique case (p)
      3'sd1:  c2p = cw << 1;
      3'sd2:  c2p = cw << 2;
      -3'sd1: c2p = -(cw << 1);
      -3'sd2: c2p = -(cw << 2);
      default: c2p = '0;
    endcase
    dnext = dreg + c2p;
  end

  csa42 #(.W(WW)) u_wcsa (
    .a(rws), .b(rwc), .x(negpd), .y(negp2c), .cin0(1'b0), .cin1(1'b0),
    .s(wn_s), .c(wn_c)
  );

  // ---------------- digit selection ----------------
  logic [WW-1:0] ys_src, yc_src;
  logic [6:0]    yhat;
  logic [7:0]    dhat;
  digit_t        pnext;
  always_comb begin
    ys_src = load ? ws0 : wn_s;
    yc_src = load ? wc0 : wn_c;
    yhat   = ys_src[F -: 7] + yc_src[F -: 7];            // estimate of 4w
    dhat   = load ? d0[F -: 8] : (dreg[F -: 8] + c2p[F -: 8]);
  end

  qsel_comb u_sel (.y(signed'(yhat)), .dhat(dhat), .p(pnext));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws <= '0; wc <= '0; dreg <= '0; creg <= '0; p <= '0; q0_r <= '0;
    end else if (load) begin
      ws <= ws0; wc <= wc0; dreg <= d0; creg <= c0; p <= pnext; q0_r <= q0_n;
    end else if (iter) begin
      ws <= wn_s; wc <= wn_c; dreg <= dnext; creg <= creg >> 2; p <= pnext;
    end
  end

  logic [WW-1:0] wsum;
  always_comb begin
    q0       = load ? q0_n : q0_r;
    wsum     = ws + wc;
    res_neg  = wsum[WW-1];
    res_zero = (wsum == '0);
  end
endmodule
