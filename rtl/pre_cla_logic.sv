// Pre-CLA logic block of the ICALU: bit-wise logic between the first two
// operands, L(i) = A(i) LOP B(i), ahead of the adder.
//
// It serves the categories whose first operation is logical, and in this
// design also forms A xor B as the half-sum of A +/- B when the second
// operation is logical. The inputs arrive already true or complemented
// (inversion sits in front of the block), so subtraction and the inverted
// logic forms need nothing extra here. Control word (icalu_pkg::logic_ctl_t):
//   fadd : L = A            fand : L = A.B
//   f_or : L = A + B        fxor : L = A xor B
//   finv : inverts the AND / OR / XOR result
// Same format as the Post-CLA block; the pass-through meaning of fadd here is
// this design's choice. Purely combinational.
module pre_cla_logic
  import icalu_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic_ctl_t       ctl,
  output logic [WIDTH-1:0] l
);
  logic [WIDTH-1:0] f;

  always_comb begin
    f = '0;
    if (ctl.fand) f = a & b;
    if (ctl.f_or) f = a | b;
    if (ctl.fxor) f = a ^ b;
    if (ctl.fadd) l = a;
    else          l = ctl.finv ? ~f : f;
  end
endmodule
