// otf_round: on-the-fly conversion and rounding of radix-4 signed digits
// (digit-by-digit result path).
//
// Digits q_j in {-2..2} arrive one per cycle (step). Three shift registers are
// kept without any carry propagation:
//   Q  = Q[j],   QM = Q[j] - 4^-j,   QP = Q[j] + 4^-j
// and at each digit they are shifted left by one radix-4 digit:
//   Q'  = q>=0  ? (Q,q)    : (QM,4+q)
//   QM' = q>0   ? (Q,q-1)  : (QM,3+q)
//   QP' = q>=-1 ? (Q,q+1)  : (QM,5+q)
// The registers are loaded with the integer part Q[0] (1 or 2) by init.
// The first NKEEP digits enter the registers (2 integer + 2*NKEEP fraction
// bits = RW bits); the two digits after them are folded into a tail value
// t = 4*q_a + q_b (units of 2^-(2*NKEEP+4)). Rounding to nearest-even then
// only selects one register: with the sign and zero flags of the final
// residual (the residual's sign is the sign of the remaining error),
//   QP if t > 8, or t == 8 and (residual > 0, or residual == 0 and Q odd)
//   QM if t < -8, or t == -8 and (residual < 0, or residual == 0 and Q odd)
//   Q  otherwise.
// The Q/QM/QP update rules follow the design description; the tail form of
// the rounding step is this implementation's rendering of its rounding table.
// Timing: registers update on the clock edge with step; result is
// combinational from the registers and the residual flags.
module otf_round
  import rsr_pkg::*;
#(
  parameter int NKEEP = 26,
  parameter int RWID  = 2 + 2*NKEEP
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,       // load integer part q0
  input  logic [1:0]      q0,
  input  logic            step,       // digit q valid
  input  digit_t          q,
  input  logic            res_neg,    // final residual < 0
  input  logic            res_zero,   // final residual == 0
  output logic [RWID-1:0] result,     // rounded, 2 integer bits
  output logic [RWID-1:0] q_trunc     // Q after NKEEP digits (unrounded)
);
  logic [RWID-1:0] rq, rqm, rqp;
  logic signed [4:0] tail;
  localparam int CW = $clog2(NKEEP+3);
  localparam logic [CW-1:0] N0 = CW'(NKEEP), N2 = CW'(NKEEP + 2);
  logic [CW-1:0] cnt;
  logic [1:0] dq, dqm, dqp;

  always_comb begin
    dq  = q[1:0];                    // (4+q) mod 4 == q mod 4
    dqm = 2'(q - 3'sd1);             // (q-1) mod 4
    dqp = 2'(q + 3'sd1);             // (q+1) mod 4
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rq <= '0; rqm <= '0; rqp <= '0; tail <= '0; cnt <= '0;
    end else if (init) begin
      rq   <= RWID'(q0);
      rqm  <= RWID'(q0 - 2'd1);
      rqp  <= RWID'({1'b0, q0} + 3'd1);
      tail <= '0;
      cnt  <= '0;
    end else if (step) begin
      if (cnt < N0) begin
        rq  <= (q >= 0)    ? {rq[RWID-3:0], dq}   : {rqm[RWID-3:0], dq};
        rqm <= (q > 0)     ? {rq[RWID-3:0], dqm}  : {rqm[RWID-3:0], dqm};
        rqp <= (q >= -1)   ? {rq[RWID-3:0], dqp}  : {rqm[RWID-3:0], dqp};
      end else if (cnt < N2) begin
        tail <= 5'(tail * 4) + 5'(q);
      end
      if (cnt < N2) cnt <= cnt + 1'b1;
    end
  end

  logic up, down;
  always_comb begin
    up   = (tail > 5'sd8)  || (tail == 5'sd8  && ((!res_neg && !res_zero) || (res_zero && rq[0])));
    down = (tail < -5'sd8) || (tail == -5'sd8 && (res_neg || (res_zero && rq[0])));
    result  = up ? rqp : (down ? rqm : rq);
    q_trunc = rq;
  end
endmodule
