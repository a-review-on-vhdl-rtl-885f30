// Two-issue execution unit with an interlock collapsing ALU.
//
// A register array feeds two execution units: ALU1, a conventional 2-1 ALU,
// and in place of the usual second 2-1 ALU the ICALU, a 3-1 ALU. Each cycle
// the unit takes a pair of two-address instructions ("op rd, rs",
// rd <- rd op rs). Independent instructions run side by side. When the second
// instruction uses the result of the first, the ICALU executes both as one
// collapsed three-operand operation while ALU1 executes the first, so an
// interlocked pair also completes in one cycle. Only a pair whose second
// instruction would need four source operands falls back to two cycles on
// ALU1 (pair_ready is low in the first).
//
// Interface and timing:
//   pair_valid/pair_ready : a pair is accepted at a rising edge with both
//                           high; its results are in the register array
//                           after that edge. pair_ready is combinational.
//                           A pair not yet accepted must be held unchanged
//                           (checked by an assertion).
//   load_*                : writes a register (lowest write priority), used
//                           to set up register contents.
//   dbg_addr/dbg_data     : combinational read of any register.
//   retired/collapsed/serialized : one-cycle status of the accepted pair.
// Synchronous active-low reset clears the registers and the sequencing flop.
// The unit itself (dual units, ICALU replacing the second ALU, collapsing)
// follows the source design; the instruction format, the interlock rule and
// the serial fallback are this design's.
module icalu_parallel_unit
  import icalu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pair_valid,
  output logic              pair_ready,
  input  insn_t             insn1,
  input  insn_t             insn2,
  input  logic              load_we,
  input  logic [REG_AW-1:0] load_addr,
  input  logic [DW-1:0]  load_data,
  input  logic [REG_AW-1:0] dbg_addr,
  output logic [DW-1:0]  dbg_data,
  output logic              retired,
  output logic              collapsed,
  output logic              serialized
);
  // read ports: 0,1 ALU1; 2,3,4 ICALU; 5 debug
  // write ports: 0 load, 1 ALU1, 2 ICALU (highest priority)
  logic [5:0][REG_AW-1:0] raddr;
  logic [5:0][DW-1:0]  rdata;
  logic [2:0]             we;
  logic [2:0][REG_AW-1:0] waddr;
  logic [2:0][DW-1:0]  wdata;

  logic              phase;
  pair_kind_e        kind;
  logic              done;
  logic [REG_AW-1:0] alu_x_addr, alu_y_addr, alu_waddr;
  logic [REG_AW-1:0] ic_a_addr, ic_b_addr, ic_c_addr, ic_waddr;
  opcode_e           alu_op, ic_op1, ic_op2;
  logic              ic_we, ic_interlock, ic_rev;
  logic [DW-1:0]  alu_r, ic_o;
  logic              fire;

  pair_decode u_dec (
    .insn1(insn1), .insn2(insn2), .phase(phase),
    .kind(kind), .done(done),
    .alu_x_addr(alu_x_addr), .alu_y_addr(alu_y_addr), .alu_op(alu_op),
    .alu_waddr(alu_waddr),
    .ic_a_addr(ic_a_addr), .ic_b_addr(ic_b_addr), .ic_c_addr(ic_c_addr),
    .ic_op1(ic_op1), .ic_op2(ic_op2), .ic_interlock(ic_interlock), .ic_rev(ic_rev),
    .ic_we(ic_we), .ic_waddr(ic_waddr)
  );

  assign raddr = {dbg_addr, ic_c_addr, ic_b_addr, ic_a_addr, alu_y_addr, alu_x_addr};

  reg_array #(.WIDTH(DW), .NREGS(NREGS), .NR(6), .NW(3)) u_regs (
    .clk(clk), .rst_n(rst_n),
    .raddr(raddr), .rdata(rdata),
    .we(we), .waddr(waddr), .wdata(wdata)
  );

  alu21 #(.WIDTH(DW)) u_alu1 (.a(rdata[0]), .b(rdata[1]), .op(alu_op), .r(alu_r));

  icalu #(.WIDTH(DW)) u_icalu (
    .a(rdata[2]), .b(rdata[3]), .c(rdata[4]),
    .op1(ic_op1), .op2(ic_op2), .interlock(ic_interlock), .rev(ic_rev),
    .o(ic_o)
  );

  assign fire       = pair_valid;
  assign pair_ready = done;

  assign we    = {fire & ic_we, fire, load_we};
  assign waddr = {ic_waddr, alu_waddr, load_addr};
  assign wdata = {ic_o, alu_r, load_data};

  always_ff @(posedge clk) begin
    if (!rst_n)                                  phase <= 1'b0;
    else if (fire && kind == PAIR_SERIAL)        phase <= ~phase;
  end

  // Handshake rule: a pair that is not accepted stays presented, unchanged,
  // until it is (the second cycle of a serialised pair reads it again).
  property p_hold_pair;
    @(posedge clk) disable iff (!rst_n)
      pair_valid && !pair_ready |=> pair_valid && $stable(insn1) && $stable(insn2);
  endproperty
  a_hold_pair: assert property (p_hold_pair)
    else $error("instruction pair changed or withdrawn before it was accepted");

  assign dbg_data   = rdata[5];
  assign retired    = fire & done;
  assign collapsed  = fire & (kind == PAIR_COLLAPSE);
  assign serialized = fire & done & (kind == PAIR_SERIAL);
endmodule
