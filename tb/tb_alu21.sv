// Self-check of the 2-1 ALU: all eight operations on corner and random
// operands against the reference operation.
module tb_alu21;
  import icalu_pkg::*;
  logic [31:0] a, b, r;
  opcode_e     op;
  int checks = 0, failures = 0;

  alu21 dut (.a(a), .b(b), .op(op), .r(r));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    for (int n = 0; n < 4000; n++) begin
      a = (n < 4) ? {32{n[0]}} : $urandom;
      b = (n < 4) ? {32{n[1]}} : $urandom;
      for (int o = 0; o < 8; o++) begin
        op = opcode_e'(o); #1;
        exp = ref_op(op, a, b);
        checks++;
        if (r !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL op=%s a=%h b=%h r=%h exp=%h", op.name(), a, b, r, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
