// tb_rsr_approx: approximation recurrence against the Newton-Raphson formula.
// The digit-by-digit datapath (rsr_dbd) supplies the digits and residuals.
// After 14 steps the digits give k = P[14]; the reference evaluates one
// Newton-Raphson step on k with exact integer arithmetic,
//   reciprocal: A = k (2 - d k),   rsqrt: B = k (3 - d k^2) / 2,
// and the converted, rounded output must be within one unit in the last
// place (2^-52) of it.
module tb_rsr_approx;
  import rsr_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, iter = 0;
  op_e op = OP_RECIP;
  logic [DF-1:0] d = '0;
  digit_t p;
  logic [1:0] q0;
  logic [WW-1:0] ws, wc, wn_s, wn_c, dreg;
  logic res_neg, res_zero;
  logic [RW-1:0] result;
  int checks = 0, failures = 0;

  rsr_dbd u_dbd (.*);
  rsr_approx #(.G(G_APPROX), .RWID(RW)) dut (
    .clk, .rst_n, .load, .iter, .op, .d, .q0, .p, .ws, .wc, .wn_s, .wn_c,
    .dreg, .result, .ambig()
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic signed [511:0] big_t;

  initial begin
    big_t dd, k, num, den, a52, r;
    logic [DF-1:0] x;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      op = op_e'(n % 2);
      x = {$urandom, $urandom};
      if (op == OP_RECIP) x[DF-1] = 1'b1; else if (!x[DF-1]) x[DF-2] = 1'b1;
      d = x; load = 1;
      #1; k = big_t'(q0);
      @(negedge clk);
      load = 0;
      for (int j = 0; j < G_APPROX; j++) begin
        k = k * 4 + big_t'(p);
        iter = 1;
        @(negedge clk);
        iter = 0;
      end
      // k = K / 4^14 = K / 2^28, d = dd / 2^54
      dd = big_t'(d);
      if (op == OP_RECIP) begin
        // A = K/2^28 * (2 - dd K / 2^82) = K (2^83 - dd K) / 2^110
        num = k * ((big_t'(1) <<< 83) - dd * k);
        den = big_t'(1) <<< 110;
      end else begin
        // B = K/2^28 * (3 - dd K^2 / 2^110) / 2 = K (3*2^110 - dd K^2) / 2^139
        num = k * (3 * (big_t'(1) <<< 110) - dd * k * k);
        den = big_t'(1) <<< 139;
      end
      a52 = (num <<< 52) / den;                 // floor(A * 2^52)
      r = big_t'(result);
      checks++;
      if (r - a52 > 1 || a52 - r > 1) begin
        failures++;
        $display("approx mismatch op=%0d d=%h got %h ref %h", op, d, result, a52[RW-1:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
