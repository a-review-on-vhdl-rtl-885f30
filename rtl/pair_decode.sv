// Pair decoder and interlock detector of the two-issue unit.
//
// Looks at the two instructions of an issue pair ("op rd, rs": rd <- rd op rs)
// and decides how they run:
//   PAIR_PARALLEL : no interlock. ALU1 runs instruction 1, the ICALU runs
//                   instruction 2 in non-interlocked mode. One cycle.
//   PAIR_COLLAPSE : instruction 2 reads the register instruction 1 writes.
//                   ALU1 still runs instruction 1; the ICALU runs both as one
//                   3-1 operation. One cycle.
//                   rd2 == rd1 : o = (R[rd1] op1 R[rs1]) op2 R[rs2]
//                   rs2 == rd1 : o = R[rd2] op2 (R[rd1] op1 R[rs1])  (rev)
//   PAIR_SERIAL   : instruction 2 needs the result twice (rd2 == rs2 == rd1),
//                   four source operands that a 3-1 ALU cannot take. ALU1
//                   runs instruction 1 in phase 0 and instruction 2 in
//                   phase 1. Two cycles.
// Collapsing into a 3-operand operation follows the source design; the
// detection rule, the serial fallback and the port layout are this design's.
// Purely combinational; 'phase' comes from the unit's sequencing flop.
module pair_decode
  import icalu_pkg::*;
(
  input  insn_t             insn1,
  input  insn_t             insn2,
  input  logic              phase,
  output pair_kind_e        kind,
  output logic              done,       // the pair retires in this cycle
  // ALU1
  output logic [REG_AW-1:0] alu_x_addr,
  output logic [REG_AW-1:0] alu_y_addr,
  output opcode_e           alu_op,
  output logic [REG_AW-1:0] alu_waddr,
  // ICALU
  output logic [REG_AW-1:0] ic_a_addr,
  output logic [REG_AW-1:0] ic_b_addr,
  output logic [REG_AW-1:0] ic_c_addr,
  output opcode_e           ic_op1,
  output opcode_e           ic_op2,
  output logic              ic_interlock,
  output logic              ic_rev,
  output logic              ic_we,
  output logic [REG_AW-1:0] ic_waddr
);
  logic dep_d, dep_s;

  assign dep_d = (insn2.rd == insn1.rd);
  assign dep_s = (insn2.rs == insn1.rd);

  always_comb begin
    if (dep_d && dep_s)      kind = PAIR_SERIAL;
    else if (dep_d || dep_s) kind = PAIR_COLLAPSE;
    else                     kind = PAIR_PARALLEL;

    // ALU1 runs instruction 1 unless it is phase 1 of a serial pair
    alu_x_addr = insn1.rd;
    alu_y_addr = insn1.rs;
    alu_op     = insn1.op;
    alu_waddr  = insn1.rd;

    // ICALU default: instruction 2 alone
    ic_a_addr    = insn2.rd;
    ic_b_addr    = insn2.rs;
    ic_c_addr    = insn2.rs;
    ic_op1       = insn2.op;
    ic_op2       = OP_ADD;
    ic_interlock = 1'b0;
    ic_rev       = 1'b0;
    ic_we        = 1'b1;
    ic_waddr     = insn2.rd;
    done         = 1'b1;

    unique case (kind)
      PAIR_COLLAPSE: begin
        ic_a_addr    = insn1.rd;
        ic_b_addr    = insn1.rs;
        ic_c_addr    = dep_d ? insn2.rs : insn2.rd;
        ic_op1       = insn1.op;
        ic_op2       = insn2.op;
        ic_interlock = 1'b1;
        ic_rev       = ~dep_d;
      end
      PAIR_SERIAL: begin
        ic_we = 1'b0;
        done  = phase;
        if (phase) begin
          alu_x_addr = insn2.rd;
          alu_y_addr = insn2.rs;
          alu_op     = insn2.op;
          alu_waddr  = insn2.rd;
        end
      end
      default: ;
    endcase
  end
endmodule
