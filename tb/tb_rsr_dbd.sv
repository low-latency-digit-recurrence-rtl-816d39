// tb_rsr_dbd: digit-by-digit datapath against its defining invariants.
// Runs 14 steps for random operands of both operations and rebuilds the
// partial result P[j] = P0 + sum p_i 4^-i from the emitted digits. Checks at
// every step, with exact integer arithmetic:
//   reciprocal: w[j] == 4^j (1 - d P[j])          (exact, C = 0)
//               D[j] == d
//   rsqrt     : w[j] == (1/2) 4^j (1 - d P[j]^2) and D[j] == d P[j]
//               within the truncation of C (a few units of 4^j 2^-58)
// plus the convergence bound |w[j]| <= D[j] and that every digit occurs.
module tb_rsr_dbd;
  import rsr_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, iter = 0;
  op_e op = OP_RECIP;
  logic [DF-1:0] d = '0;
  digit_t p;
  logic [1:0] q0;
  logic [WW-1:0] ws, wc, wn_s, wn_c, dreg;
  logic res_neg, res_zero;
  int checks = 0, failures = 0;
  int seen [5];

  rsr_dbd dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic signed [255:0] big_t;

  initial begin
    big_t dF, pint, w, wref, dref, tol, scale;
    logic [DF-1:0] x;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      op = op_e'(n % 2);
      x = {$urandom, $urandom};
      if (op == OP_RECIP) x[DF-1] = 1'b1; else if (!x[DF-1]) x[DF-2] = 1'b1;
      d = x; load = 1;
      @(negedge clk);
      load = 0;
      dF = big_t'(d) <<< (F - DF);
      pint = big_t'(q0);                        // P[j] * 4^j
      for (int j = 0; j <= G_APPROX; j++) begin
        // state now holds w[j], D[j]; p is p[j+1]
        w = big_t'(signed'(WW'(ws + wc)));
        scale = big_t'(1) <<< (2*j);            // 4^j
        if (op == OP_RECIP) begin
          wref = (scale <<< F) - dF * pint;                  // 4^j 2^F - d_F P 4^j
          dref = dF;
          tol  = 0;
        end else begin
          // (1/2) 4^j (1 - d P^2) * 2^F = (4^(2j) 2^F - d_F pint^2) / (2 * 4^j)
          wref = ((scale * scale) <<< F) - dF * pint * pint;
          wref = wref / (2 * scale);
          dref = (dF * pint) / scale;
          tol  = 8 * scale + 8;
        end
        checks += 3;
        if ((w - wref > tol) || (wref - w > tol)) begin
          failures++;
          $display("w mismatch op=%0d j=%0d d=%h", op, j, d);
        end
        if ((big_t'(dreg) - dref > 64) || (dref - big_t'(dreg) > 64)) begin
          failures++;
          $display("D mismatch op=%0d j=%0d d=%h", op, j, d);
        end
        if ((w < 0 ? -w : w) > big_t'(dreg)) failures++;
        if (j == G_APPROX) break;
        seen[int'(p) + 2]++;
        pint = pint * 4 + big_t'(p);
        iter = 1;
        @(negedge clk);
        iter = 0;
      end
    end
    for (int k = 0; k < 5; k++) begin checks++; if (seen[k] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
