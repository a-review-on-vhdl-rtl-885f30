// Exhaustive self-check of the 8-bit carry lookahead slice: every x, y and
// carry input, compared with integer addition; group generate and propagate
// compared with their definitions (carry out with cin=0, all bits propagate).
module tb_cla8;
  logic [7:0] x, y, s;
  logic       cin, cout, gg, gp;
  int checks = 0, failures = 0;

  cla8 dut (.x(x), .y(y), .cin(cin), .s(s), .cout(cout), .gg(gg), .gp(gp));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8:0] exp;
    logic [8:0] exp0;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int k = 0; k < 2; k++) begin
          x = 8'(i); y = 8'(j); cin = 1'(k);
          #1;
          exp  = 9'(i) + 9'(j) + 9'(k);
          exp0 = 9'(i) + 9'(j);
          checks++;
          if ({cout, s} !== exp || gg !== exp0[8] || gp !== ((x ^ y) == 8'hff)) begin
            failures++;
            if (failures < 10)
              $display("FAIL x=%h y=%h cin=%b s=%h cout=%b gg=%b gp=%b", x, y, cin, s, cout, gg, gp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
