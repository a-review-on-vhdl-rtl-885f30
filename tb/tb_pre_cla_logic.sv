// Self-check of the Pre-CLA logic block: every control word in use (pass,
// AND, OR, XOR and their inverted forms) on random operands against the
// bit-wise operators.
module tb_pre_cla_logic;
  import icalu_pkg::*;
  logic [31:0] a, b, l;
  logic_ctl_t  ctl;
  int checks = 0, failures = 0;

  pre_cla_logic dut (.a(a), .b(b), .ctl(ctl), .l(l));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    for (int n = 0; n < 3000; n++) begin
      a = $urandom; b = $urandom;
      for (int op = 2; op < 8; op++) begin
        ctl = lop_ctl(opcode_e'(op)); #1;
        exp = ref_op(opcode_e'(op), a, b);
        checks++;
        if (l !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL op=%0d a=%h b=%h l=%h exp=%h", op, a, b, l, exp);
        end
      end
      ctl = '0; ctl.fadd = 1'b1; #1;
      checks++;
      if (l !== a) begin
        failures++;
        if (failures < 10) $display("FAIL pass a=%h l=%h", a, l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
