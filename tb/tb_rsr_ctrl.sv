// tb_rsr_ctrl: sequencing check. For both modes: load only in the start
// cycle, iter high for exactly 14 (or 28) cycles with first on the first of
// them, done one cycle after the last, valid until the next start, a start
// during busy is ignored, op and exact are captured with start. With ambig
// high at the end of an overlapped run, the run must go on to 28 steps and
// select the digit-by-digit result (use_exact).
module tb_rsr_ctrl;
  import rsr_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, exact = 0, ambig = 0;
  op_e op = OP_RECIP;
  logic load, iter, busy, done, valid, exact_r, first, use_exact;
  op_e op_r;
  int checks = 0, failures = 0;

  rsr_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_iter, n_first, cyc;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 12; r++) begin
      @(negedge clk);
      exact = r[0]; op = op_e'(r[1]); ambig = r[2]; start = 1;
      #1; checks++; if (!load) failures++;
      @(negedge clk);
      start = 0; exact = ~exact; op = op_e'(~op);      // must not matter now
      n_iter = 0; n_first = 0; cyc = 1;
      while (!done) begin
        if (iter) n_iter++;
        if (first) begin n_first++; if (n_iter != 1) failures++; end
        if (cyc == 5) begin start = 1; #1; if (load) failures++; end
        @(negedge clk);
        start = 0; cyc++;
      end
      checks += 6;
      if (n_iter != ((r[0] || r[2]) ? G_EXACT : G_APPROX)) failures++;
      if (use_exact != (r[0] || r[2])) failures++;
      if (n_first != 1) failures++;
      if (cyc != n_iter + 1) failures++;
      if (exact_r != r[0] || op_r != op_e'(r[1])) failures++;
      if (busy || !valid) failures++;
      @(negedge clk);
      checks++; if (done || !valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
