// recip_unit: radix-4 reciprocal unit (reciprocal-only architecture).
//
// Computes 1/d for d in [1/2,1) (d*2^54 on the input), result with 2 integer
// and 52 fraction bits, in two modes like the combined unit:
//  * exact = 0: digit-by-digit recurrence and the overlapped Newton-Raphson
//    digit recurrence, rounded to nearest on the approximation; when the
//    approximation is too close to a rounding boundary the run goes on as a
//    digit-by-digit run and returns that result instead (latency 30);
//  * exact = 1: digit-by-digit only, on-the-fly conversion and rounding to
//    nearest-even from the last digits and the final residual.
// Digit-by-digit part: w[j+1] = 4w[j] - q[j+1] d with a 3-2 carry-save adder,
// q[j+2] = SEL(4w[j+1], d) from a 7-bit short adder and 3 divisor bits
// (qsel_recip). Approximation part:
//   E[j+1] = 16 E[j] + q[j+1] (2*4w[j] - q[j+1] d)
// with a 3-2 adder for 2rw[j] - qd, a digit multiplexer on both vectors and
// a 4-2 adder with 16E[j]. Initial values: w[0] = 1/4, Q[0] = 0, E[0] = 0, so
// the digits are those of 1/(4d) and E[g]/16^g approximates 1/(16d); the
// result is 16 E[g]/16^g.
// Since the first digit q1 (1 or 2) only rebuilds the integer part, this
// unit needs one step more than the combined unit for the same accuracy: 15
// steps in the overlapped mode (latency 16 clock edges) and 29 in the exact
// mode (latency 30). The 14 steps given for this architecture leave an
// error of up to about 2^-53.4, too large for rounding to 53 bits.
// The first overlapped step leaves E[1] (in (1,2]) in the carry-save window
// without handing a digit to the converter; any multiple of 4 that the two
// vectors carry then drops out of the 2-bit integer part of the result.
// Structure, selection constants and initial values follow the design
// description; formats, step counts and the converter details are this
// implementation's choice.
module recip_unit
  import rsr_pkg::*;
#(
  parameter int GA = G_APPROX + 1,   // overlapped steps
  parameter int GE = G_EXACT + 1     // exact-mode steps
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          exact,
  input  logic [DF-1:0] d,
  output logic          busy,
  output logic          done,
  output logic          valid,
  output logic [RW-1:0] result
);
  logic load, iter, exact_r, first, ambig, use_exact;
  op_e  op_unused;

  rsr_ctrl #(.GA(GA), .GE(GE)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .op(OP_RECIP), .exact(exact),
    .load(load), .iter(iter), .busy(busy), .done(done), .valid(valid),
    .op_r(op_unused), .exact_r(exact_r), .first(first),
    .ambig(ambig), .use_exact(use_exact)
  );

  // ---------------- digit-by-digit part ----------------
  logic [WW-1:0] ws, wc, wn_s, wn_c, dreg, dF, qd, negqd, rws, rwc;
  digit_t        q, qnext;
  logic [2:0]    di;
  logic [6:0]    yhat;

  always_comb begin
    dF    = WW'(d) << (F - DF);
    di    = load ? d[DF-2 -: 3] : dreg[F-2 -: 3];
    unique case (q)
      3'sd1, -3'sd1: qd = dreg;
      3'sd2, -3'sd2: qd = dreg << 1;
      default:       qd = '0;
    endcase
    negqd = (q > 0) ? ~qd : qd;                        // -q*d (minus a unit)
    rws   = {ws[WW-3:0], 1'b0, (q > 0)};               // 4ws plus correction
    rwc   = {wc[WW-3:0], 2'b00};
  end

  csa32 #(.W(WW)) u_wcsa (.a(rws), .b(rwc), .x(negqd), .cin(1'b0),
                          .s(wn_s), .c(wn_c));

  always_comb begin
    // w[0] = 1/4 in the load cycle, so the estimate of 4w[0] is 1 (16/16)
    yhat = load ? 7'sd16 : (wn_s[F -: 7] + wn_c[F -: 7]);
  end

  qsel_recip u_sel (.y(signed'(yhat)), .di(di), .q(qnext));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ws <= '0; wc <= '0; dreg <= '0; q <= '0;
    end else if (load) begin
      ws <= WW'(1) << (F - 2); wc <= '0; dreg <= dF; q <= qnext;
    end else if (iter) begin
      ws <= wn_s; wc <= wn_c; q <= qnext;
    end
  end

  // ---------------- approximation part ----------------
  function automatic logic [NE-1:0] sext_w(input logic [WW-1:0] x);
    return NE'(signed'(x));
  endfunction

  function automatic logic [NE-1:0] dmul(input digit_t dg, input logic [NE-1:0] x);
    logic [NE-1:0] m;
    unique case (dg)
      3'sd1, -3'sd1: m = x;
      3'sd2, -3'sd2: m = x << 1;
      default:       m = '0;
    endcase
    return (dg < 0) ? ~m : m;
  endfunction

  logic [L+1:0]  hs, hc;
  logic [NE-1:0] qdL, negqdL, xs, xc, t1s, t1c, h16s, h16c, es, ec;
  logic [3:0]    ncor;
  always_comb begin
    qdL    = dmul((q < 0) ? -q : q, sext_w(dreg) << 1);       // |q| d
    negqdL = (q > 0) ? ~qdL : qdL;
    t1s    = dmul(q, xs);
    t1c    = dmul(q, xc);
    ncor   = (q < 0) ? 4'd2 : 4'd0;
    h16s   = {1'b0, hs, 4'b0000};
    h16c   = {1'b0, hc, ncor};
  end

  // 2rw[j] - q d  (8w in units of the E window: shift by 4)
  csa32 #(.W(NE)) u_xcsa (.a(sext_w(ws) << 4), .b(sext_w(wc) << 4), .x(negqdL),
                          .cin(q > 0), .s(xs), .c(xc));
  csa42 #(.W(NE)) u_ecsa (.a(t1s), .b(t1c), .x(h16s), .y(h16c),
                          .cin0(1'b0), .cin1(1'b0), .s(es), .c(ec));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hs <= '0; hc <= '0;
    end else if (load) begin
      hs <= '0; hc <= '0;
    end else if (iter) begin
      if (first) begin
        hs <= es[L+1:0];
        hc <= ec[L+1:0];
      end else begin
        hs <= {2'b10, es[L-1:0]};
        hc <= {2'b00, ec[L-1:0]};
      end
    end
  end

  logic [RW-1:0] r_approx;
  approx_conv #(.G(GA - 1), .RWID(RW)) u_conv (
    .clk(clk), .rst_n(rst_n), .init(load), .step(iter && !first),
    .es(es[L+6:L]), .ec(ec[L+6:L]),
    .rs(hs[L+1:L-4]), .rc(hc[L+1:L-4]),
    .result(r_approx), .pend_o(), .ambig(ambig)
  );

  // ---------------- exact mode conversion ----------------
  logic [WW-1:0] wsum;
  logic [RW+1:0] r_exact;
  always_comb begin
    wsum = ws + wc;
  end

  otf_round #(.NKEEP(GE - 2), .RWID(RW + 2)) u_otf (
    .clk(clk), .rst_n(rst_n), .init(load), .q0(2'd0), .step(iter), .q(q),
    .res_neg(wsum[WW-1]), .res_zero(wsum == '0), .result(r_exact), .q_trunc()
  );

  assign result = use_exact ? r_exact[RW-1:0] : r_approx;
endmodule
