// Conventional 2-1 ALU (ALU1 of the two-issue unit).
//
// Two operands in, one result out: r = a op b. As in the source design it
// has one 2-1 CLA for the arithmetic operations and one logic stage for the
// logical ones. Subtraction complements b and injects the hot one through the
// CLA carry input. The logic stage reuses the Pre-CLA logic block cell.
// Purely combinational.
module alu21
  import icalu_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  opcode_e          op,
  output logic [WIDTH-1:0] r
);
  logic             sub;
  logic [WIDTH-1:0] sum, lres;

  assign sub = (op == OP_SUB);

  cla32 #(.WIDTH(WIDTH)) u_cla (.x(a), .y(sub ? ~b : b), .cin(sub), .s(sum));

  pre_cla_logic #(.WIDTH(WIDTH)) u_logic (.a(a), .b(b), .ctl(lop_ctl(op)), .l(lres));

  assign r = is_arith(op) ? sum : lres;
endmodule
