// CSA_CARY: one bit of the carry vector of the ICALU carry save adder.
//
//   lambda(i+1) = K2.A(i).B(i) + K1.B(i).C(i) + K1.A(i).C(i) + K3.C(i+1)
//
// With K1=K2=1, K3=0 it is the ordinary full-adder carry of A, B, C; with
// only K2 it is the carry of A+B alone; with only K3 it passes C unshifted;
// with all zero it is zero. One cell is the bit cell of the function the
// source design gives; inputs are bit i of A, B, C and bit i+1 of C.
// Purely combinational.
module csa_cary (
  input  logic k1,
  input  logic k2,
  input  logic k3,
  input  logic a_i,
  input  logic b_i,
  input  logic c_i,
  input  logic c_ip1,
  output logic lam_ip1
);
  assign lam_ip1 = (k2 & a_i & b_i) | (k1 & b_i & c_i) | (k1 & a_i & c_i) | (k3 & c_ip1);
endmodule
