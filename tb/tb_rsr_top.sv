// tb_rsr_top: end-to-end test of both units at their default sizes.
// The combined unit and the reciprocal-only unit run concurrently on random
// and corner operands. Each result is checked against exact integer
// arithmetic (correct rounding in both modes) and each latency against 15/29
// (combined) and 16/30 (reciprocal-only) clock edges; an overlapped run that
// falls back to the digit-by-digit result takes the longer latency and must
// show the unit's fallback flag. Counts how often each mechanism occurs and
// fails if one never does: both operations, both modes, both initial-value
// branches of each operation, every digit value, a rounding step that picks
// QP and one that picks QM, a carry into the approximation converter's R/RP
// registers, a rounding fallback in each unit, and a start request ignored
// while busy.
module tb_rsr_top;
  import rsr_pkg::*;
  localparam int NRUN = 3000;

  logic clk = 0, rst_n = 0;
  logic c_start = 0, c_exact = 0, r_start = 0, r_exact = 0;
  op_e  c_op = OP_RECIP;
  logic [DF-1:0] c_d = '0, r_d = '0;
  logic c_busy, c_done, c_valid, r_busy, r_done, r_valid;
  logic [RW-1:0] c_result, r_result;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_op [2], n_mode [2], n_branch [4], n_digit [5];
  int n_qp = 0, n_qm = 0, n_carry = 0, n_ignored = 0, n_r_mode [2], n_fb [2];

  rsr_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // digits, converter carries and rounding selections seen inside the units
  always @(posedge clk) begin
    if (dut.u_comb.iter) n_digit[int'(dut.u_comb.p) + 2]++;
    if (dut.u_comb.iter && !dut.u_comb.exact_r &&
        dut.u_comb.u_approx.u_conv.t >= 5'd16) n_carry++;
    if (c_done && dut.u_comb.exact_r) begin
      if (dut.u_comb.u_otf.up)   n_qp++;
      if (dut.u_comb.u_otf.down) n_qm++;
    end
  end

  function automatic bit ref_check(input op_e o, input logic [DF-1:0] dd,
                                   input logic [RW-1:0] r, output bit within1);
    logic [255:0] D, R, lo, hi, t;
    D = 256'(dd); R = 256'(r);
    if (o == OP_RECIP) begin
      lo = (2*R - 1) * D; hi = (2*R + 1) * D; t = 256'(1) << 107;
      within1 = ((R - 1) * D < (256'(1) << 106)) && ((R + 1) * D > (256'(1) << 106));
    end else begin
      lo = (2*R - 1) * (2*R - 1) * D; hi = (2*R + 1) * (2*R + 1) * D;
      t = 256'(1) << 160;
      within1 = ((R - 1) * (R - 1) * D < (256'(1) << 158)) &&
                ((R + 1) * (R + 1) * D > (256'(1) << 158));
    end
    return (lo <= t) && (t <= hi);
  endfunction

  function automatic logic [DF-1:0] rand_d(input op_e o);
    logic [DF-1:0] x;
    x = {$urandom, $urandom};
    if (o == OP_RECIP) x[DF-1] = 1'b1;
    else if (!x[DF-1]) x[DF-2] = 1'b1;
    if (x[DF-1]) x[0] = 1'b0;
    return x;
  endfunction

  task automatic judge(input string unit_name, input int u, input op_e o, input bit ex,
                       input logic [DF-1:0] dd, input logic [RW-1:0] res,
                       input int cyc, input int lat, input int lat_ex, input bit fb_flag);
    bit ok, w1;
    checks += 3;
    if (!ex && cyc == lat_ex) n_fb[u]++;
    if (!(cyc == (ex ? lat_ex : lat) || (!ex && cyc == lat_ex))) begin
      failures++;
      $display("%s: latency %0d, expected %0d", unit_name, cyc, ex ? lat_ex : lat);
    end
    if (!ex && (cyc == lat_ex) != fb_flag) begin
      failures++;
      $display("%s: fallback flag does not match the latency", unit_name);
    end
    ok = ref_check(o, dd, res, w1);
    if (!ok) begin
      failures++;
      $display("%s: wrong result op=%0d exact=%0d d=%h r=%h", unit_name, o, ex, dd, res);
    end
  endtask

  task automatic run_comb(input op_e o, input bit ex, input logic [DF-1:0] dd);
    int cyc;
    @(negedge clk);
    c_op = o; c_exact = ex; c_d = dd; c_start = 1;
    @(negedge clk);
    c_start = 0; cyc = 1;
    while (!c_done) begin
      // a second request in the middle of a run must be ignored
      if (cyc == 3) begin
        c_start = 1; c_d = ~dd;
        @(negedge clk);
        c_start = 0; c_d = dd; cyc++;
        if (c_busy) n_ignored++;
        continue;
      end
      @(negedge clk); cyc++;
    end
    n_op[o]++; n_mode[ex]++;
    if (o == OP_RECIP) n_branch[(dd[DF-1] && dd[DF-2]) ? 0 : 1]++;
    else               n_branch[dd[DF-1] ? 2 : 3]++;
    judge("combined", 0, o, ex, dd, c_result, cyc, G_APPROX + 1, G_EXACT + 1,
          dut.u_comb.use_exact);
  endtask

  task automatic run_recip(input bit ex, input logic [DF-1:0] dd);
    int cyc;
    @(negedge clk);
    r_exact = ex; r_d = dd; r_start = 1;
    @(negedge clk);
    r_start = 0; cyc = 1;
    while (!r_done) begin @(negedge clk); cyc++; end
    n_r_mode[ex]++;
    judge("reciprocal", 1, OP_RECIP, ex, dd, r_result, cyc, G_APPROX + 2, G_EXACT + 2,
          dut.u_recip.use_exact);
  endtask

  initial begin
    n_op = '{0, 0}; n_mode = '{0, 0}; n_r_mode = '{0, 0}; n_fb = '{0, 0};
    n_branch = '{0, 0, 0, 0}; n_digit = '{0, 0, 0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      begin
        run_comb(OP_RSQRT, 1'b1, 54'h1a000000000000);
        run_comb(OP_RECIP, 1'b0, 54'h20000000000000);
        for (int i = 0; i < NRUN; i++) begin
          op_e o;
          o = op_e'($urandom_range(0, 1));
          run_comb(o, $urandom_range(0, 1) == 1, rand_d(o));
        end
      end
      begin
        run_recip(1'b0, 54'h20000000000000);
        run_recip(1'b1, 54'h3ffffffffffffe);
        for (int i = 0; i < NRUN; i++)
          run_recip($urandom_range(0, 1) == 1, rand_d(OP_RECIP));
      end
    join
    $display("ops recip/rsqrt %0d/%0d, modes approx/exact %0d/%0d, branches %0d %0d %0d %0d",
             n_op[0], n_op[1], n_mode[0], n_mode[1], n_branch[0], n_branch[1], n_branch[2], n_branch[3]);
    $display("digits -2..2: %0d %0d %0d %0d %0d", n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4]);
    $display("QP %0d, QM %0d, converter carries %0d, ignored starts %0d, recip modes %0d/%0d",
             n_qp, n_qm, n_carry, n_ignored, n_r_mode[0], n_r_mode[1]);
    $display("rounding fallbacks: combined %0d, reciprocal %0d", n_fb[0], n_fb[1]);
    for (int k = 0; k < 2; k++) begin
      checks += 4;
      if (n_fb[k] == 0) failures++;
      if (n_op[k] == 0) failures++;
      if (n_mode[k] == 0) failures++;
      if (n_r_mode[k] == 0) failures++;
    end
    for (int k = 0; k < 4; k++) begin checks++; if (n_branch[k] == 0) failures++; end
    for (int k = 0; k < 5; k++) begin checks++; if (n_digit[k] == 0) failures++; end
    checks += 4;
    if (n_qp == 0) failures++;
    if (n_qm == 0) failures++;
    if (n_carry == 0) failures++;
    if (n_ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
