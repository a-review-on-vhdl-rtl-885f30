// Self-check of the 32-bit CLA: corner operands (carry chains across the
// 8-bit slice borders C8, C16, C24 and the discarded C32) and random ones,
// compared with integer addition modulo 2^32.
module tb_cla32;
  logic [31:0] x, y, s;
  logic        cin;
  int checks = 0, failures = 0;

  cla32 dut (.x(x), .y(y), .cin(cin), .s(s));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] xv, logic [31:0] yv, logic cv);
    x = xv; y = yv; cin = cv;
    #1;
    checks++;
    if (s !== xv + yv + 32'(cv)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h y=%h cin=%b s=%h", xv, yv, cv, s);
    end
  endtask

  initial begin
    automatic logic [31:0] corners [8] = '{32'h0, 32'hffffffff, 32'h000000ff, 32'h0000ffff,
                                 32'h00ffffff, 32'h80000000, 32'h7fffffff, 32'h00000001};
    foreach (corners[i]) foreach (corners[j]) for (int k = 0; k < 2; k++)
      check(corners[i], corners[j], 1'(k));
    for (int n = 0; n < 20000; n++) check($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
