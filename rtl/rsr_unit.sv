// rsr_unit: combined radix-4 reciprocal and reciprocal square-root unit.
//
// Computes 1/d (op = OP_RECIP, d in [1/2,1)) or 1/sqrt(d) (op = OP_RSQRT,
// d in [1/4,1)) for a 53-bit significand. Two modes:
//  * exact = 0: the digit-by-digit recurrence produces 14 radix-4 digits
//    (about 28 bits) and, overlapped with it, a second digit recurrence
//    evaluates one Newton-Raphson step on that partial result; the
//    approximation is converted on the fly and rounded to nearest.
//    Latency 15 clock edges from start (init + first digit, 14 steps).
//    If the approximation lies too close to a rounding boundary to be
//    rounded safely (about one run in twenty), the controller lets the
//    digit-by-digit recurrence continue to 28 digits and returns its
//    correctly rounded result instead: latency 29 for that run.
//  * exact = 1: only the digit-by-digit part runs, 28 digits, followed by
//    on-the-fly conversion and rounding to nearest-even from the last digits
//    and the sign/zero of the final residual. Latency 29 clock edges.
// Interface: d is d*2^54 (54 fraction bits). result has 2 integer and 52
// fraction bits (value in (1,2]); it is valid from done until the next start.
// Blocks: rsr_ctrl (sequencing), rsr_dbd (digit-by-digit datapath with the
// digit selection), rsr_approx (approximation recurrence with its on-the-fly
// converter) and otf_round (digit-by-digit on-the-fly conversion and
// rounding). The partition, the two modes and the fallback follow the design
// description; the test for a safe rounding is this design's own.
module rsr_unit
  import rsr_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  op_e           op,
  input  logic          exact,
  input  logic [DF-1:0] d,
  output logic          busy,
  output logic          done,
  output logic          valid,
  output logic [RW-1:0] result
);
  logic load, iter, exact_r, ambig, use_exact;
  op_e  op_r, op_m;
  digit_t p;
  logic [1:0] q0;
  logic [WW-1:0] ws, wc, wn_s, wn_c, dreg;
  logic res_neg, res_zero;
  logic [RW-1:0] r_approx, r_exact;

  rsr_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .op(op), .exact(exact),
    .load(load), .iter(iter), .busy(busy), .done(done), .valid(valid),
    .op_r(op_r), .exact_r(exact_r), .first(),
    .ambig(ambig), .use_exact(use_exact)
  );

  // the operation is taken from the input in the load cycle, then held
  assign op_m = load ? op : op_r;

  rsr_dbd u_dbd (
    .clk(clk), .rst_n(rst_n), .load(load), .iter(iter), .op(op_m), .d(d),
    .p(p), .q0(q0), .ws(ws), .wc(wc), .wn_s(wn_s), .wn_c(wn_c), .dreg(dreg),
    .res_neg(res_neg), .res_zero(res_zero)
  );

  rsr_approx #(.G(G_APPROX), .RWID(RW)) u_approx (
    .clk(clk), .rst_n(rst_n), .load(load), .iter(iter), .op(op_m), .d(d),
    .q0(q0), .p(p), .ws(ws), .wc(wc), .wn_s(wn_s), .wn_c(wn_c), .dreg(dreg),
    .result(r_approx), .ambig(ambig)
  );

  otf_round #(.NKEEP(26), .RWID(RW)) u_otf (
    .clk(clk), .rst_n(rst_n), .init(load), .q0(q0), .step(iter), .q(p),
    .res_neg(res_neg), .res_zero(res_zero), .result(r_exact), .q_trunc()
  );

  assign result = use_exact ? r_exact : r_approx;
endmodule
