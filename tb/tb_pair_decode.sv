// Self-check of the pair decoder: random instruction pairs drawn from a few
// registers so every kind of pair occurs, in both phases. Expected kind,
// operand addresses, operations and write enables are derived here from the
// dependency rules; each kind must be seen.
module tb_pair_decode;
  import icalu_pkg::*;
  insn_t             insn1, insn2;
  logic              phase;
  pair_kind_e        kind;
  logic              done;
  logic [REG_AW-1:0] alu_x_addr, alu_y_addr, alu_waddr, ic_a_addr, ic_b_addr, ic_c_addr, ic_waddr;
  opcode_e           alu_op, ic_op1, ic_op2;
  logic              ic_we, ic_interlock, ic_rev;
  int checks = 0, failures = 0;
  int seen [3] = '{default: 0};

  pair_decode dut (.*);

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %p %p phase=%b", what, insn1, insn2, phase);
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      logic dd, ds;
      insn1 = '{op: opcode_e'($urandom), rd: REG_AW'($urandom % 3), rs: REG_AW'($urandom % 3)};
      insn2 = '{op: opcode_e'($urandom), rd: REG_AW'($urandom % 3), rs: REG_AW'($urandom % 3)};
      phase = 1'($urandom);
      #1;
      dd = insn2.rd == insn1.rd;
      ds = insn2.rs == insn1.rd;
      if (dd && ds) begin
        seen[2]++;
        expect_eq(kind == PAIR_SERIAL, "kind serial");
        expect_eq(!ic_we && done == phase, "serial enables");
        if (!phase) expect_eq(alu_op == insn1.op && alu_x_addr == insn1.rd && alu_y_addr == insn1.rs
                              && alu_waddr == insn1.rd, "serial phase 0");
        else        expect_eq(alu_op == insn2.op && alu_x_addr == insn2.rd && alu_y_addr == insn2.rs
                              && alu_waddr == insn2.rd, "serial phase 1");
      end else begin
        expect_eq(done && ic_we, "one-cycle enables");
        expect_eq(alu_op == insn1.op && alu_x_addr == insn1.rd && alu_y_addr == insn1.rs
                  && alu_waddr == insn1.rd && ic_waddr == insn2.rd, "alu1 routing");
        if (dd || ds) begin
          seen[1]++;
          expect_eq(kind == PAIR_COLLAPSE && ic_interlock, "kind collapse");
          expect_eq(ic_a_addr == insn1.rd && ic_b_addr == insn1.rs && ic_op1 == insn1.op
                    && ic_op2 == insn2.op, "collapse a/b");
          expect_eq(ic_c_addr == (dd ? insn2.rs : insn2.rd) && ic_rev == ds, "collapse c");
        end else begin
          seen[0]++;
          expect_eq(kind == PAIR_PARALLEL && !ic_interlock, "kind parallel");
          expect_eq(ic_a_addr == insn2.rd && ic_b_addr == insn2.rs && ic_op1 == insn2.op, "parallel icalu");
        end
      end
    end
    foreach (seen[i]) begin
      $display("pair kind %0d seen %0d times", i, seen[i]);
      if (seen[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
