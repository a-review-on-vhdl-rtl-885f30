// Self-check of the 3-1 carry save adder for every K1/K2/K3 setting the ICALU
// uses: S must be the bit-wise three-input sum, and the carry vector the full
// carry (then S + lambda = A + B + C), the A.B carry, C itself or zero, with
// the hot one in bit 0. Also the 4-bit worked example of the adder text.
module tb_csa32;
  logic [31:0] a, b, c, s, lam;
  logic        k1, k2, k3, hot0;
  int checks = 0, failures = 0;

  csa32 dut (.a(a), .b(b), .c(c), .k1(k1), .k2(k2), .k3(k3), .hot0(hot0), .s(s), .lam(lam));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string what);
    failures++;
    if (failures < 10)
      $display("FAIL %s a=%h b=%h c=%h k=%b%b%b h=%b s=%h lam=%h", what, a, b, c, k1, k2, k3, hot0, s, lam);
  endtask

  initial begin
    // worked example: X=0101, Y=0011, Z=0100 -> partial sum 0010,
    // saved carry 1010, final sum 0010 + 1010 = 1100 (5 + 3 + 4 = 12)
    a = 32'b0101; b = 32'b0011; c = 32'b0100; hot0 = 1'b0;
    {k1, k2, k3} = 3'b110; #1;
    checks++; if (s !== 32'b0010) fail("example partial sum");
    checks++; if (lam !== 32'b1010) fail("example saved carry");
    checks++; if (s + lam !== 32'b1100) fail("example final sum");
    for (int n = 0; n < 5000; n++) begin
      a = $urandom; b = $urandom; c = $urandom; hot0 = 1'($urandom);
      // full carry
      {k1, k2, k3} = 3'b110; #1;
      checks++; if (s !== (a ^ b ^ c)) fail("sum");
      checks++; if (s + lam !== a + b + c + 32'(hot0)) fail("full");
      // carry of A+B only
      {k1, k2, k3} = 3'b010; #1;
      checks++; if (lam !== (((a & b) << 1) | 32'(hot0))) fail("ab");
      checks++; if ((a ^ b) + lam !== a + b + 32'(hot0)) fail("ab-sum");
      // C passed through
      {k1, k2, k3} = 3'b001; hot0 = 1'b0; #1;
      checks++; if (lam !== c) fail("c");
      // zero
      {k1, k2, k3} = 3'b000; #1;
      checks++; if (lam !== 32'h0) fail("zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
