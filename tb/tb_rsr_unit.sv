// tb_rsr_unit: self-checking test of the combined reciprocal / rsqrt unit.
// Random and corner operands in both operations and both modes. The
// reference is exact integer arithmetic: with D = d*2^54 and the result R
// (units 2^-52), 1/d is R*D against 2^106 and 1/sqrt(d) is R^2*D against
// 2^158. Checks: the exactly rounded mode returns the correctly rounded
// (nearest) value in both modes; latency is 15 clock edges from start to
// done in the overlapped mode, or 29 when that run had to fall back to the
// digit-by-digit result (which must agree with the unit's fallback flag, and
// happen in some but at most a fifth of the runs), and 29 in the exact mode.
module tb_rsr_unit;
  import rsr_pkg::*;
  localparam int NRUN = 400;

  logic clk = 0, rst_n = 0, start = 0, exact = 0;
  op_e  op = OP_RECIP;
  logic [DF-1:0] d = '0;
  logic busy, done, valid;
  logic [RW-1:0] result;
  int checks = 0, failures = 0, approx_rn = 0, approx_n = 0, n_fb = 0;

  rsr_unit dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // returns 1 if r is the correctly rounded value, sets within1 if |err|<=1ulp
  function automatic bit ref_check(input op_e o, input logic [DF-1:0] dd,
                                   input logic [RW-1:0] r, output bit within1);
    logic [255:0] D, R, lo, hi, t;
    D = 256'(dd); R = 256'(r);
    if (o == OP_RECIP) begin
      // correctly rounded: (2R-1)*D <= 2^107 <= (2R+1)*D
      lo = (2*R - 1) * D; hi = (2*R + 1) * D; t = 256'(1) << 107;
      within1 = ((R - 1) * D < (256'(1) << 106)) && ((R + 1) * D > (256'(1) << 106));
      return (lo <= t) && (t <= hi);
    end else begin
      lo = (2*R - 1) * (2*R - 1) * D; hi = (2*R + 1) * (2*R + 1) * D;
      t = 256'(1) << 160;
      within1 = ((R - 1) * (R - 1) * D < (256'(1) << 158)) &&
                ((R + 1) * (R + 1) * D > (256'(1) << 158));
      return (lo <= t) && (t <= hi);
    end
  endfunction

  task automatic run(input op_e o, input bit ex, input logic [DF-1:0] dd);
    int cyc;
    bit ok, w1;
    @(negedge clk);
    op = o; exact = ex; d = dd; start = 1;
    @(negedge clk);
    start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    // overlapped runs that could not be rounded take the exact-mode latency
    if (!ex && cyc == G_EXACT + 1) n_fb++;
    if (!(cyc == (ex ? G_EXACT + 1 : G_APPROX + 1) || (!ex && cyc == G_EXACT + 1))) begin
      failures++;
      $display("latency error: %0d cycles (op=%0d exact=%0d)", cyc, o, ex);
    end
    checks++;
    if (!ex && (cyc == G_EXACT + 1) != dut.u_ctrl.use_exact) begin
      failures++;
      $display("fallback flag does not match the latency");
    end
    ok = ref_check(o, dd, result, w1);
    checks++;
    if (!ex) begin
      approx_n++;
      if (ok) approx_rn++;
    end
    if (!ok) begin
      failures++;
      $display("not correctly rounded: op=%0d exact=%0d d=%h r=%h (within 1 ulp: %0d)",
               o, ex, dd, result, w1);
    end
  endtask

  function automatic logic [DF-1:0] rand_d(input op_e o);
    logic [DF-1:0] x;
    x = {$urandom, $urandom};
    if (o == OP_RECIP) x[DF-1] = 1'b1;                    // [1/2,1)
    else if (!x[DF-1]) x[DF-2] = 1'b1;                    // [1/4,1)
    if (x[DF-1]) x[0] = 1'b0;                             // 53-bit significand
    return x;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // corners: smallest and largest operands, branch thresholds
    for (int e = 0; e < 2; e++) begin
      run(OP_RECIP, e[0], 54'h20000000000000);          // d = 1/2
      run(OP_RECIP, e[0], 54'h3ffffffffffffe);          // d -> 1
      run(OP_RECIP, e[0], 54'h30000000000000);          // d = 3/4
      run(OP_RECIP, e[0], 54'h2ffffffffffffe);
      run(OP_RSQRT, e[0], 54'h10000000000000);          // d = 1/4
      run(OP_RSQRT, e[0], 54'h20000000000000);          // d = 1/2
      run(OP_RSQRT, e[0], 54'h1ffffffffffffe);
      run(OP_RSQRT, e[0], 54'h3ffffffffffffe);
      run(OP_RSQRT, e[0], 54'h1a000000000000);          // d = 0.40625
    end
    for (int i = 0; i < NRUN; i++) begin
      op_e o;
      o = op_e'($urandom_range(0, 1));
      run(o, $urandom_range(0, 1) == 1, rand_d(o));
    end
    $display("overlapped mode: %0d of %0d correctly rounded, %0d by the fallback",
             approx_rn, approx_n, n_fb);
    // the fallback must occur, but only in a small share of the runs
    checks += 2;
    if (n_fb == 0) failures++;
    if (n_fb * 5 > approx_n) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
