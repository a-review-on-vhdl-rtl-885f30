// Interlock collapsing ALU (ICALU): a 32-bit 3-1 ALU.
//
// Executes two dependent (interlocked) instructions as one three-operand
// operation in a single pass, or, in non-interlocked mode, one ordinary
// two-operand operation:
//   interlock = 1, rev = 0 : o = (a op1 b) op2 c
//   interlock = 1, rev = 1 : o = c op2 (a op1 b)
//   interlock = 0          : o = a op1 b        (c forced to zero, op2 = ADD)
// Data flow (the structure of the source design):
//   operands (true or complemented)
//     -> 3-1 CSA  -> S, lambda        -> Pre-CLA logic -> L
//   M1 picks S or L for CLA input 1; CLA input 2 is the CSA carry vector,
//   whose K1/K2/K3 controls realise the M2 choice between the full carry,
//   C, the A.B carry and zero; 32-bit CLA -> R;
//   Post-CLA logic -> P = R LOP C; M3 picks R or P as the result o.
// The control word comes from icalu_ctrl. Purely combinational: one pass
// through CSA, CLA and the two logic levels.
module icalu
  import icalu_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  input  opcode_e          op1,
  input  opcode_e          op2,
  input  logic             interlock,
  input  logic             rev,
  output logic [WIDTH-1:0] o
);
  icalu_ctl_t       ctl;
  logic [WIDTH-1:0] ai, bi, ci, c_eff;
  logic [WIDTH-1:0] s, lam, l, inp1, r, p;

  icalu_ctrl u_ctrl (.op1(op1), .op2(op2), .interlock(interlock), .rev(rev), .ctl(ctl));

  assign c_eff = interlock ? c : '0;
  assign ai    = ctl.inv_a ? ~a     : a;
  assign bi    = ctl.inv_b ? ~b     : b;
  assign ci    = ctl.inv_c ? ~c_eff : c_eff;

  csa32 #(.WIDTH(WIDTH)) u_csa (
    .a(ai), .b(bi), .c(ci),
    .k1(ctl.k1), .k2(ctl.k2), .k3(ctl.k3), .hot0(ctl.hot0),
    .s(s), .lam(lam)
  );

  pre_cla_logic #(.WIDTH(WIDTH)) u_pre (.a(ai), .b(bi), .ctl(ctl.pre), .l(l));

  assign inp1 = ctl.m1_sel_l ? l : s;   // M1

  cla32 #(.WIDTH(WIDTH)) u_cla (.x(inp1), .y(lam), .cin(ctl.cin), .s(r));

  post_cla_logic #(.WIDTH(WIDTH)) u_post (.r(r), .c(c_eff), .ctl(ctl.post), .p(p));

  assign o = ctl.m3_sel_p ? p : r;      // M3
endmodule
