// tb_csa32: random check of the 3-2 carry-save adder: s + c must equal
// a + b + x + cin modulo 2^W, for a narrow and a datapath-wide instance.
module tb_csa32;
  localparam int W1 = 9, W2 = 66;
  logic [W1-1:0] a1, b1, x1, s1, c1;
  logic [W2-1:0] a2, b2, x2, s2, c2;
  logic ci1, ci2;
  int checks = 0, failures = 0;

  csa32 #(.W(W1)) u1 (.a(a1), .b(b1), .x(x1), .cin(ci1), .s(s1), .c(c1));
  csa32 #(.W(W2)) u2 (.a(a2), .b(b2), .x(x2), .cin(ci2), .s(s2), .c(c2));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W1-1:0] e1;
    logic [W2-1:0] e2;
    for (int i = 0; i < 2000; i++) begin
      a1 = W1'($urandom); b1 = W1'($urandom); x1 = W1'($urandom); ci1 = 1'($urandom);
      a2 = {$urandom, $urandom, $urandom}; b2 = {$urandom, $urandom, $urandom};
      x2 = {$urandom, $urandom, $urandom}; ci2 = 1'($urandom);
      #1;
      e1 = a1 + b1 + x1 + W1'(ci1);
      e2 = a2 + b2 + x2 + W2'(ci2);
      checks += 2;
      if (W1'(s1 + c1) != e1) failures++;
      if (W2'(s2 + c2) != e2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
