// approx_conv: on-the-fly conversion and rounding of the Newton-Raphson
// approximation E[j] (or H[j]), which is produced in carry-save form and
// shifted left by one radix-16 digit per iteration.
//
// Each iteration the 7 bits that leave the top of the carry-save window
// (sum field es, carry field ec) are added by a short adder. The datapath
// keeps a constant bias of 2 units in the residual that stays behind, so the
// digit handed over here is e = es + ec - 2, always in 0..95, i.e. a radix-16
// digit e[3:0] plus a carry e[6:4] of 0..5 into the previous digit. The
// previous digit is held in a pending register (pend); the digits before it
// are held in two shift registers R and RP = R + 1 (the figure's QQ and QP).
// With t = pend + e[6:4] (at most 20):
//   R'  = (t >= 16 ? RP : R, t mod 16)
//   RP' = R' + 1, formed the same way from t+1
//   pend' = e[3:0]
// so no carry ever propagates along R. After G digits R holds the integer
// part and fraction bits down to 2^-(4G-4); pend and the residual rho (in
// [2,4) units of 2^-4G, estimated from its top bits rs/rc) give the rounding
// decision: the rounded result is RP if pend + rho >= 8, else R.
// Rounding is to nearest on the approximation (ties and the residual's low
// bits are not resolved exactly). The approximation lies slightly below the
// true value (by less than 16/256 of a unit in the last place), so a rounding
// value pend + rho (in units of 1/256 ulp) inside [AMB_LO, AMB_HI) cannot be
// rounded safely: ambig flags this, and the unit then finishes the result
// with the digit-by-digit recurrence instead.
// Following the design description: short adder on the leading bits, a
// pending digit corrected by later carries, two shift registers. The bias of
// 2 and the 7-bit field width are this implementation's choice.
// Timing: updates on the clock edge with step; result is combinational.
module approx_conv
  import rsr_pkg::*;
#(
  parameter int G    = G_APPROX,
  parameter int RWID = 4*G - 2,
  parameter int AMB_LO = 112,     // band of unsafe rounding values,
  parameter int AMB_HI = 130      // units of 1/256 ulp
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            init,
  input  logic            step,
  input  logic [6:0]      es,      // top field of the new sum vector
  input  logic [6:0]      ec,      // top field of the new carry vector
  input  logic [5:0]      rs,      // residual sum, bits 2^1..2^-4 (units)
  input  logic [5:0]      rc,      // residual carry, bits 2^1..2^-4
  output logic [RWID-1:0] result,
  output logic [3:0]      pend_o,
  output logic            ambig    // rounding decision not safe
);
  logic [RWID-1:0] r, rp;
  logic [3:0]      pend;
  logic [6:0]      e;
  logic [4:0]      t, t1;

  always_comb begin
    e  = es + ec - 7'd2;
    t  = {1'b0, pend} + {2'b00, e[6:4]};
    t1 = t + 5'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0; rp <= '0; pend <= '0;
    end else if (init) begin
      r <= '0; rp <= RWID'(1); pend <= '0;
    end else if (step) begin
      r    <= t[4]  ? {rp[RWID-5:0], t[3:0]}  : {r[RWID-5:0], t[3:0]};
      rp   <= t1[4] ? {rp[RWID-5:0], t1[3:0]} : {r[RWID-5:0], t1[3:0]};
      pend <= e[3:0];
    end
  end

  logic [8:0] rho16;   // residual estimate, units of 1/16
  logic [8:0] xr;      // rounding value pend + rho, units of 1/256 ulp
  always_comb begin
    rho16  = {3'b000, rs} + {3'b000, rc};
    xr     = {pend, 4'b0000} + rho16;
    result = (xr >= 9'd128) ? rp : r;
    ambig  = (xr >= 9'(AMB_LO)) && (xr < 9'(AMB_HI));
    pend_o = pend;
  end
endmodule
