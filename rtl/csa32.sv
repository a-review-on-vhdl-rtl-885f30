// 3-1 carry save adder of the ICALU.
//
// Reduces three operands to a sum vector S and a carry vector lambda so that
// A + B + C = S + lambda when K1=K2=1, K3=0 and hot0=0. The sum is one SUM3_1
// cell per bit (bits 0..WIDTH-1); the carry is one CSA_CARY cell per bit
// position 1..WIDTH-1 (the carry out of bit WIDTH-1 is dropped, arithmetic is
// two's complement). Through K1, K2, K3 the carry vector also supplies the
// other choices for the second CLA input, so the M2 multiplexer of the data
// flow is folded into it:
//   K1=K2=1, K3=0 : lambda = carry of A+B+C (shifted left one place)
//   K2=1 only     : lambda = (A & B) << 1, the carry vector of A+B
//   K3=1 only     : lambda = C
//   all zero      : lambda = 0
// Bit 0 of lambda is free in the shifted forms; this design uses it to inject
// a hot one (hot0) for two's complement subtraction, and ORs it with K3.C(0)
// (the control unit never sets both). Purely combinational.
module csa32 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  input  logic             k1,
  input  logic             k2,
  input  logic             k3,
  input  logic             hot0,
  output logic [WIDTH-1:0] s,
  output logic [WIDTH-1:0] lam
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_sum
    sum3_1 u_sum (.a(a[i]), .b(b[i]), .c(c[i]), .s(s[i]));
  end

  for (genvar i = 0; i < WIDTH - 1; i++) begin : g_cary
    csa_cary u_cary (
      .k1(k1), .k2(k2), .k3(k3),
      .a_i(a[i]), .b_i(b[i]), .c_i(c[i]), .c_ip1(c[i+1]),
      .lam_ip1(lam[i+1])
    );
  end

  assign lam[0] = hot0 | (k3 & c[0]);
endmodule
