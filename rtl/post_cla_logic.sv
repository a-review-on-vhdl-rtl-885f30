// Post-CLA logic block of the ICALU (P_CLA_LOGBLK): bit-wise logic between
// the CLA result R and the third operand C, one bit cell per position 0..31.
//
// Output for each control word (icalu_pkg::logic_ctl_t), as specified:
//   fadd           : P = R
//   fand           : P = R.C        fand, finv : P = not(R.C)
//   f_or           : P = R + C      f_or, finv : P = not(R + C)
//   fxor           : P = R xor C    fxor, finv : P = not(R xor C)
// Other control words are not used; this design returns 0 for them.
// Purely combinational.
module post_cla_logic
  import icalu_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] r,
  input  logic [WIDTH-1:0] c,
  input  logic_ctl_t       ctl,
  output logic [WIDTH-1:0] p
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    // P_CLA_BCMP bit cell
    always_comb begin
      logic f;
      case (1'b1)
        ctl.fand: f = r[i] & c[i];
        ctl.f_or: f = r[i] | c[i];
        ctl.fxor: f = r[i] ^ c[i];
        default:  f = 1'b0;
      endcase
      if (ctl.fadd) p[i] = r[i];
      else          p[i] = (ctl.fand | ctl.f_or | ctl.fxor) ? (f ^ ctl.finv) : 1'b0;
    end
  end
endmodule
