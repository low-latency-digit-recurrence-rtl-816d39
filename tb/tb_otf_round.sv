// tb_otf_round: random radix-4 digit strings through the on-the-fly
// converter. The reference forms the exact value V = Q0*4^28 + sum q_i 4^(28-i)
// (units 2^-56) with integer arithmetic and rounds it to 2^-52 by the sign of
// the remaining error (the residual flags): nearest, ties to even.
// Checks the rounded result and the unrounded prefix after 26 digits, and that
// both the QP (round up) and the QM (round down) selections occur.
module tb_otf_round;
  import rsr_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, step = 0, res_neg = 0, res_zero = 0;
  logic [1:0] q0 = 0;
  digit_t q = 0;
  logic [RW-1:0] result, q_trunc;
  int checks = 0, failures = 0, n_up = 0, n_down = 0, n_tie = 0;

  otf_round #(.NKEEP(26), .RWID(RW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v, m, rem, pre;
    bit up;
    int sgn;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      q0 = 2'($urandom_range(1, 2)); init = 1;
      v = longint'(q0);
      @(negedge clk);
      init = 0;
      for (int i = 0; i < 28; i++) begin
        // a few runs with a forced tail to reach exact ties and borrows
        if (i >= 26 && n % 7 == 0) q = (i == 26) ? ((n % 14 == 0) ? 3'sd2 : -3'sd2) : 3'sd0;
        else q = digit_t'($urandom_range(0, 4) - 2);
        step = 1;
        v = v * 4 + longint'(q);
        if (i == 25) pre = v;
        @(negedge clk);
      end
      step = 0;
      sgn = $urandom_range(0, 2) - 1;            // -1, 0, +1
      if (n % 7 == 0) sgn = 0;
      res_neg = (sgn < 0); res_zero = (sgn == 0);
      #1;
      m = v >>> 4; rem = v & 15;
      if (sgn > 0)      up = (rem >= 8);
      else if (sgn < 0) up = (rem >= 9);
      else              up = (rem > 8) || (rem == 8 && m[0]);
      if (sgn == 0 && rem == 8) n_tie++;
      checks++;
      if (result != RW'(m + longint'(up))) begin
        failures++;
        $display("round error: v=%h sgn=%0d got %h", v, sgn, result);
      end
      checks++;
      if (q_trunc != RW'(pre)) failures++;
      if (result == dut.rqp && result != q_trunc) n_up++;
      if (result == dut.rqm && result != q_trunc) n_down++;
    end
    checks += 3;
    if (n_up == 0) failures++;
    if (n_down == 0) failures++;
    if (n_tie == 0) failures++;
    $display("round-up %0d, round-down %0d, ties %0d", n_up, n_down, n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
