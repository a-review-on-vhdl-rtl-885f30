// Self-check of the ICALU: every pair of operations (op1, op2), both operand
// orders of the second operation and the non-interlocked mode, on corner and
// random operands, against sequential execution of the two operations. The
// number of checks per category (arith-arith, logic-arith, arith-logic,
// logic-logic, non-interlocked) is counted and each must be reached.
module tb_icalu;
  import icalu_pkg::*;
  logic [31:0] a, b, c, o;
  opcode_e     op1, op2;
  logic        interlock, rev;
  int checks = 0, failures = 0;
  int cat_cnt [5] = '{default: 0};

  icalu dut (.a(a), .b(b), .c(c), .op1(op1), .op2(op2), .interlock(interlock), .rev(rev), .o(o));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] corner(int k);
    unique case (k % 6)
      0: return 32'h0;
      1: return 32'hffffffff;
      2: return 32'h80000000;
      3: return 32'h7fffffff;
      4: return 32'h1;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    logic [31:0] first, exp;
    for (int n = 0; n < 1500; n++) begin
      if (n < 216) begin a = corner(n); b = corner(n / 6); c = corner(n / 36); end
      else begin a = $urandom; b = $urandom; c = $urandom; end
      for (int o1 = 0; o1 < 8; o1++)
        for (int o2 = 0; o2 < 8; o2++)
          for (int m = 0; m < 3; m++) begin
            op1 = opcode_e'(o1); op2 = opcode_e'(o2);
            interlock = (m != 2); rev = (m == 1);
            #1;
            first = ref_op(op1, a, b);
            if (!interlock)  exp = first;
            else if (rev)    exp = ref_op(op2, c, first);
            else             exp = ref_op(op2, first, c);
            checks++;
            if (!interlock) cat_cnt[4]++;
            else cat_cnt[{~is_arith(op1), ~is_arith(op2)} == 2'b00 ? 0 :
                         {~is_arith(op1), ~is_arith(op2)} == 2'b10 ? 1 :
                         {~is_arith(op1), ~is_arith(op2)} == 2'b01 ? 2 : 3]++;
            if (o !== exp) begin
              failures++;
              if (failures < 10)
                $display("FAIL %s/%s il=%b rev=%b a=%h b=%h c=%h o=%h exp=%h",
                         op1.name(), op2.name(), interlock, rev, a, b, c, o, exp);
            end
          end
    end
    foreach (cat_cnt[i]) begin
      $display("category %0d checks: %0d", i, cat_cnt[i]);
      if (cat_cnt[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
