// tb_qsel_recip: exhaustive check of the reciprocal-only digit selection.
// For every divisor interval [i/16,(i+1)/16), i = 8..15, and every residual
// estimate y whose interval [y/16,(y+2)/16) lies in |4w| <= 8/3 d, the digit
// q must satisfy (q - 2/3) d <= 4w <= (q + 2/3) d over both intervals.
module tb_qsel_recip;
  import rsr_pkg::*;
  logic signed [6:0] y;
  logic [2:0] di;
  digit_t q;
  int checks = 0, failures = 0;
  int seen [5];

  qsel_recip dut (.y(y), .di(di), .q(q));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real dlo, dhi, lo, hi, qr;
    for (int i = 8; i < 16; i++) begin
      dlo = i / 16.0; dhi = (i + 1) / 16.0;
      for (int yy = -64; yy < 64; yy++) begin
        lo = yy / 16.0; hi = (yy + 2) / 16.0;
        if (lo < -8.0/3.0*dlo || hi > 8.0/3.0*dlo) continue;
        y = 7'(yy); di = 3'(i - 8);
        #1;
        qr = real'(q);
        checks++;
        seen[int'(q) + 2]++;
        if (lo < (qr - 2.0/3.0)*dhi - 1e-9 || lo < (qr - 2.0/3.0)*dlo - 1e-9 ||
            hi > (qr + 2.0/3.0)*dlo + 1e-9 || hi > (qr + 2.0/3.0)*dhi + 1e-9) begin
          failures++;
          $display("containment violated: i=%0d y=%0d q=%0d", i, yy, q);
        end
      end
    end
    // first step: 4w[0] = 1 gives q1 = 2 below d = 3/4 and 1 above
    for (int i = 8; i < 16; i++) begin
      y = 7'sd16; di = 3'(i - 8); #1;
      checks++;
      if (q != ((i < 12) ? 3'sd2 : 3'sd1)) failures++;
    end
    for (int k = 0; k < 5; k++) begin checks++; if (seen[k] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
