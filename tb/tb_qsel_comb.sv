// tb_qsel_comb: exhaustive check of the shared digit-selection function.
// For every D interval [i/32,(i+1)/32), i = 16..31, and every residual
// estimate y (units 1/16) whose interval [y/16,(y+2)/16) (carry-save
// estimate error below 2/16) lies inside the reachable range |4w| <= 8/3 D,
// the selected digit p must keep the next reciprocal residual bounded:
//   (p - 2/3) D <= 4w <= (p + 2/3) D   for all 4w and D in the intervals.
// Also checks the saturation of D estimates outside [1/2,1) and the digit
// chosen for y = -20/16, D = 26/32 (first reciprocal square-root step).
module tb_qsel_comb;
  import rsr_pkg::*;
  logic signed [6:0] y;
  logic [7:0] dhat;
  digit_t p;
  int checks = 0, failures = 0;
  int seen [5];

  qsel_comb dut (.y(y), .dhat(dhat), .p(p));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real dlo, dhi, lo, hi, pr;
    digit_t ref_p;
    for (int i = 16; i < 32; i++) begin
      dlo = i / 32.0; dhi = (i + 1) / 32.0;
      for (int yy = -64; yy < 64; yy++) begin
        lo = yy / 16.0; hi = (yy + 2) / 16.0;
        if (lo < -8.0/3.0*dlo || hi > 8.0/3.0*dlo) continue;
        // dhat values inside the interval: i*4 .. i*4+3 (units 1/128)
        for (int f = 0; f < 4; f++) begin
          y = 7'(yy); dhat = 8'(i*4 + f);
          #1;
          pr = real'(p);
          checks++;
          seen[int'(p) + 2]++;
          if (lo < (pr - 2.0/3.0)*dhi - 1e-9 || lo < (pr - 2.0/3.0)*dlo - 1e-9 ||
              hi > (pr + 2.0/3.0)*dlo + 1e-9 || hi > (pr + 2.0/3.0)*dhi + 1e-9) begin
            failures++;
            $display("containment violated: i=%0d y=%0d p=%0d", i, yy, p);
          end
        end
      end
    end
    // saturation: D >= 1 behaves as 31/32, D < 1/2 as 16/32
    for (int yy = -64; yy < 64; yy++) begin
      y = 7'(yy);
      dhat = 8'd124; #1; ref_p = p;
      dhat = 8'd200; #1; checks++; if (p != ref_p) failures++;
      dhat = 8'd64;  #1; ref_p = p;
      dhat = 8'd40;  #1; checks++; if (p != ref_p) failures++;
    end
    // first rsqrt step for d = 0.40625: 4w0 = -20/16, D0 = 26/32 needs p = -2
    y = -7'sd21; dhat = 8'd104; #1; checks++; if (p != -3'sd2) failures++;
    // every digit value occurs
    for (int k = 0; k < 5; k++) begin checks++; if (seen[k] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
