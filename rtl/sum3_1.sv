// SUM3_1: one bit of three-input sum, s = a xor b xor c.
// Bit cell of the carry save adder sum vector and of the CLA sum, as in the
// source design. Purely combinational.
module sum3_1 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s
);
  assign s = a ^ b ^ c;
endmodule
