// Shared types and constants of the interlock collapsing execution unit.
//
// The operation set is the one the ICALU collapses: add and subtract on
// 32-bit two's complement numbers and the bit-wise logical operations AND,
// OR, XOR together with their inverted forms (selected by the FINV control
// signal of the logic blocks). The 3-bit opcode encoding, the two-address
// instruction layout "op Rd, Rs" (Rd <- Rd op Rs) and the 16-entry register
// array are choices of this design; the word width of 32 follows the
// specification of the ALU.
package icalu_pkg;

  localparam int unsigned DW     = 32;  // data path width
  localparam int unsigned NREGS  = 16;  // registers in the register array
  localparam int unsigned REG_AW = $clog2(NREGS);

  typedef enum logic [2:0] {
    OP_ADD  = 3'd0,
    OP_SUB  = 3'd1,
    OP_AND  = 3'd2,
    OP_OR   = 3'd3,
    OP_XOR  = 3'd4,
    OP_NAND = 3'd5,
    OP_NOR  = 3'd6,
    OP_XNOR = 3'd7
  } opcode_e;

  // Two-address instruction: rd <- rd op rs
  typedef struct packed {
    opcode_e           op;
    logic [REG_AW-1:0] rd;
    logic [REG_AW-1:0] rs;
  } insn_t;

  // How an issue pair is executed (see pair_decode)
  typedef enum logic [1:0] {
    PAIR_PARALLEL = 2'd0,
    PAIR_COLLAPSE = 2'd1,
    PAIR_SERIAL   = 2'd2
  } pair_kind_e;

  // Control word of a bit-wise logic block (same format for the Pre-CLA
  // and the Post-CLA block). At most one of fadd/fand/f_or/fxor is set;
  // finv inverts the AND/OR/XOR result.
  typedef struct packed {
    logic fadd;   // pass the first input through
    logic fand;
    logic f_or;
    logic fxor;
    logic finv;
  } logic_ctl_t;

  // Full control word of the ICALU data path.
  typedef struct packed {
    logic       inv_a;    // complement operand A ahead of CSA and Pre-CLA logic
    logic       inv_b;    // complement operand B
    logic       inv_c;    // complement operand C
    logic       k1;       // CSA carry: include B.C + A.C terms
    logic       k2;       // CSA carry: include A.B term
    logic       k3;       // CSA carry: pass C unshifted
    logic       hot0;     // hot one injected into CSA carry bit 0
    logic       cin;      // hot one injected into the CLA carry input
    logic       m1_sel_l; // M1: 1 = Pre-CLA logic output L, 0 = CSA sum S
    logic       m3_sel_p; // M3: 1 = Post-CLA logic output P, 0 = CLA result R
    logic_ctl_t pre;
    logic_ctl_t post;
  } icalu_ctl_t;

  function automatic logic is_arith(opcode_e op);
    return (op == OP_ADD) || (op == OP_SUB);
  endfunction

  // Logic block control word for a logical opcode.
  function automatic logic_ctl_t lop_ctl(opcode_e op);
    logic_ctl_t c;
    c = '0;
    unique case (op)
      OP_AND:  c.fand = 1'b1;
      OP_OR:   c.f_or = 1'b1;
      OP_XOR:  c.fxor = 1'b1;
      OP_NAND: begin c.fand = 1'b1; c.finv = 1'b1; end
      OP_NOR:  begin c.f_or = 1'b1; c.finv = 1'b1; end
      OP_XNOR: begin c.fxor = 1'b1; c.finv = 1'b1; end
      default: c.fadd = 1'b1;
    endcase
    return c;
  endfunction

  // Reference model of one two-operand operation, used by the testbenches
  // and by nothing in the hardware.
  function automatic logic [DW-1:0] ref_op(opcode_e op, logic [DW-1:0] x,
                                              logic [DW-1:0] y);
    unique case (op)
      OP_ADD:  return x + y;
      OP_SUB:  return x - y;
      OP_AND:  return x & y;
      OP_OR:   return x | y;
      OP_XOR:  return x ^ y;
      OP_NAND: return ~(x & y);
      OP_NOR:  return ~(x | y);
      default: return ~(x ^ y);
    endcase
  endfunction

endpackage
