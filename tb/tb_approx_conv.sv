// tb_approx_conv: random digit fields through the approximation converter.
// Each step hands over es/ec with es + ec - 2 = e in 0..95. The reference
// accumulates X = sum e_k 16^(14-k) exactly and expects R = X div 16 rounded
// up when 16*(X mod 16) + rho >= 128 (rho = rs + rc, residual in 1/16 units).
// ambig must be set exactly when that rounding value lies in [112, 130).
// Also counts steps in which a carry rippled into the R/RP registers.
module tb_approx_conv;
  import rsr_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, step = 0;
  logic [6:0] es = 0, ec = 0;
  logic [5:0] rs = 0, rc = 0;
  logic [RW-1:0] result;
  logic [3:0] pend_o;
  logic ambig;
  int checks = 0, failures = 0, n_carry = 0, n_rup = 0, n_amb = 0;

  approx_conv #(.G(G_APPROX), .RWID(RW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint x;
    int e;
    logic [8:0] rho;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      init = 1; x = 0;
      @(negedge clk);
      init = 0;
      for (int k = 1; k <= G_APPROX; k++) begin
        e = (k == 1) ? $urandom_range(16, 47) : $urandom_range(0, 95);
        es = 7'($urandom_range(0, 127));
        ec = 7'(e + 2 - int'(es));
        step = 1;
        x = x * 16 + longint'(e);
        if (k > 1 && (int'(pend_o) + e / 16) >= 16) n_carry++;
        @(negedge clk);
      end
      step = 0;
      rs = 6'($urandom_range(32, 63)); rc = 6'($urandom_range(0, 15));
      #1;
      rho = 9'(rs) + 9'(rc);
      checks += 2;
      begin
        longint v;
        v = (x & 15) * 16 + longint'(rho);
        if (ambig != (v >= 112 && v < 130)) failures++;
        if (ambig) n_amb++;
      end
      if ((x & 15) * 16 + longint'(rho) >= 128) begin
        n_rup++;
        if (result != RW'((x >> 4) + 1)) failures++;
      end else if (result != RW'(x >> 4)) failures++;
    end
    checks += 3;
    if (n_carry == 0) failures++;
    if (n_amb == 0) failures++;
    if (n_rup == 0) failures++;
    $display("carries into R %0d, round-ups %0d, unsafe %0d", n_carry, n_rup, n_amb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
