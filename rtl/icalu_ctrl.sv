// Control unit of the ICALU.
//
// Turns the pair of operations handed to the ICALU into the control word of
// its data path (icalu_pkg::icalu_ctl_t). The result computed is
//   rev = 0 : O = (A op1 B) op2 C
//   rev = 1 : O = C op2 (A op1 B)   (differs only when op2 is SUB)
// When interlock = 0 (non-interlocked mode) the data path forces C to zero and
// op2 is taken as ADD, so O = A op1 B: the 2-1 operations are the 3-1 ones
// with a zero third operand, as the design requires.
//
// The four interlocked categories map onto the data path like this:
//   arith-arith  A +/- B +/- C : M1 = CSA sum, CSA carry = full carry
//                                (K1=K2=1), operands complemented for SUB,
//                                hot ones into CSA carry bit 0 and CLA carry in
//   logic-arith (A LOP B) +/- C: M1 = Pre-CLA L, CSA carry = C (K3 only)
//   arith-logic (A +/- B) LOP C: M1 = Pre-CLA A xor B, CSA carry = (A.B)<<1
//                                (K2 only), Post-CLA applies LOP with C, M3 = P
//   logic-logic (A LOP B) LOP C: M1 = Pre-CLA L, CSA carry = 0, M3 = P
// The signal names (K1..K3, FADD/FAND/FOR/FXOR/FINV) follow the source design;
// how they are derived from the operation pair is this design's own.
// Purely combinational.
module icalu_ctrl
  import icalu_pkg::*;
(
  input  opcode_e    op1,
  input  opcode_e    op2,
  input  logic       interlock,
  input  logic       rev,
  output icalu_ctl_t ctl
);
  opcode_e op2e;
  logic    a1, a2, sub1, sub2, rv;

  always_comb begin
    op2e = interlock ? op2 : OP_ADD;
    rv   = interlock & rev;
    a1   = is_arith(op1);
    a2   = is_arith(op2e);
    sub1 = (op1 == OP_SUB);
    sub2 = (op2e == OP_SUB);

    ctl = '0;
    ctl.pre.fadd  = 1'b1;
    ctl.post.fadd = 1'b1;

    unique case ({a1, a2})
      2'b11: begin  // arithmetic followed by arithmetic
        ctl.k1 = 1'b1;
        ctl.k2 = 1'b1;
        if (rv && sub2) begin
          // C - (A +/- B) = ~A + (B or ~B) + C + hot ones
          ctl.inv_a = 1'b1;
          ctl.inv_b = ~sub1;
          ctl.hot0  = 1'b1;
          ctl.cin   = ~sub1;
        end else begin
          ctl.inv_b = sub1;
          ctl.inv_c = sub2;
          ctl.hot0  = sub1;
          ctl.cin   = sub2;
        end
      end
      2'b01: begin  // logical followed by arithmetic
        ctl.m1_sel_l = 1'b1;
        ctl.pre      = lop_ctl(op1);
        ctl.k3       = 1'b1;
        if (rv && sub2) begin
          // C - L = ~L + C + 1
          ctl.pre.finv = ~ctl.pre.finv;
          ctl.cin      = 1'b1;
        end else begin
          ctl.inv_c = sub2;
          ctl.cin   = sub2;
        end
      end
      2'b10: begin  // arithmetic followed by logical
        ctl.m1_sel_l = 1'b1;
        ctl.pre      = lop_ctl(OP_XOR);
        ctl.inv_b    = sub1;
        ctl.k2       = 1'b1;
        ctl.hot0     = sub1;
        ctl.post     = lop_ctl(op2e);
        ctl.m3_sel_p = 1'b1;
      end
      default: begin  // logical followed by logical
        ctl.m1_sel_l = 1'b1;
        ctl.pre      = lop_ctl(op1);
        ctl.post     = lop_ctl(op2e);
        ctl.m3_sel_p = 1'b1;
      end
    endcase
  end

  // Rules the data path relies on: lambda bit 0 carries either C(0) or the
  // hot one, never both; each logic block gets at most one function.
  always_comb begin
    a_lam0: assert (!(ctl.k3 && ctl.hot0));
    a_pre:  assert ($countones({ctl.pre.fadd, ctl.pre.fand, ctl.pre.f_or, ctl.pre.fxor}) <= 1);
    a_post: assert ($countones({ctl.post.fadd, ctl.post.fand, ctl.post.f_or, ctl.post.fxor}) <= 1);
  end
endmodule
