// Self-check of the ICALU control unit. For every operation pair and mode the
// control word is (1) checked for the structure each category must use (which
// multiplexer input, which CSA carry form, which logic block is active) and
// (2) applied to a behavioural model of the data path written with plain
// operators here, whose result must equal sequential execution.
module tb_icalu_ctrl;
  import icalu_pkg::*;
  opcode_e    op1, op2;
  logic       interlock, rev;
  icalu_ctl_t ctl;
  int checks = 0, failures = 0;

  icalu_ctrl dut (.op1(op1), .op2(op2), .interlock(interlock), .rev(rev), .ctl(ctl));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] lmodel(logic_ctl_t k, logic [31:0] x, logic [31:0] y);
    logic [31:0] f;
    f = k.fand ? (x & y) : k.f_or ? (x | y) : k.fxor ? (x ^ y) : 32'h0;
    return k.fadd ? x : (k.finv ? ~f : f);
  endfunction

  function automatic logic [31:0] model(icalu_ctl_t k, logic [31:0] a, logic [31:0] b,
                                        logic [31:0] c0);
    logic [31:0] ai, bi, ci, s, lam, l, r, p;
    ai  = k.inv_a ? ~a : a;
    bi  = k.inv_b ? ~b : b;
    ci  = k.inv_c ? ~c0 : c0;
    s   = ai ^ bi ^ ci;
    lam = ({32{k.k2}} & ai & bi | {32{k.k1}} & (bi & ci | ai & ci)) << 1;
    lam = lam | ({32{k.k3}} & ci) | 32'(k.hot0);
    l   = lmodel(k.pre, ai, bi);
    r   = (k.m1_sel_l ? l : s) + lam + 32'(k.cin);
    p   = lmodel(k.post, r, c0);
    return k.m3_sel_p ? p : r;
  endfunction

  task automatic fail(string what);
    failures++;
    if (failures < 10)
      $display("FAIL %s op1=%s op2=%s il=%b rev=%b ctl=%h", what, op1.name(), op2.name(), interlock, rev, ctl);
  endtask

  initial begin
    logic [31:0] a, b, c, first, exp, got;
    for (int o1 = 0; o1 < 8; o1++)
      for (int o2 = 0; o2 < 8; o2++)
        for (int m = 0; m < 3; m++) begin
          op1 = opcode_e'(o1); op2 = opcode_e'(o2);
          interlock = (m != 2); rev = (m == 1);
          #1;
          // structure per category
          checks++;
          if (interlock && is_arith(op1) && is_arith(op2)) begin
            if (ctl.m1_sel_l || ctl.m3_sel_p || !ctl.k1 || !ctl.k2 || ctl.k3) fail("cat1");
          end else if (interlock && !is_arith(op1) && is_arith(op2)) begin
            if (!ctl.m1_sel_l || ctl.m3_sel_p || ctl.k1 || ctl.k2 || !ctl.k3) fail("cat2");
          end else if (interlock && is_arith(op1) && !is_arith(op2)) begin
            if (!ctl.m1_sel_l || !ctl.m3_sel_p || ctl.k1 || !ctl.k2 || ctl.k3 || !ctl.pre.fxor) fail("cat3");
          end else if (interlock) begin
            if (!ctl.m1_sel_l || !ctl.m3_sel_p || ctl.k1 || ctl.k2 || ctl.k3) fail("cat4");
          end else begin
            if (ctl.m3_sel_p || ctl.inv_c) fail("mode2");
          end
          // behaviour through the data path model
          for (int n = 0; n < 200; n++) begin
            a = $urandom; b = $urandom; c = $urandom;
            first = ref_op(op1, a, b);
            exp   = !interlock ? first : rev ? ref_op(op2, c, first) : ref_op(op2, first, c);
            got   = model(ctl, a, b, interlock ? c : 32'h0);
            checks++;
            if (got !== exp) begin fail("value"); break; end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
