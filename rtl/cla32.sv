// 32-bit carry lookahead adder of the ICALU.
//
// Four 8-bit CLA slices; the carries into slices 1..3 (C8, C16, C24) are
// generated by a second lookahead level from the slices' group generate and
// propagate signals and the carry input, so no carry ripples through a slice.
// The final carry C32 is discarded because all operations are two's
// complement. The carry input carries the hot one of a subtraction; the
// source design's lowest slice has no carry input, this design gives it one
// (see the README). Purely combinational.
module cla32 #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned SLICE = 8
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] s
);
  localparam int unsigned NS = WIDTH / SLICE;

  logic [NS-1:0] gg, gp, co;
  logic [NS:0]   sc;   // slice carries: sc[k] enters slice k

  always_comb begin
    sc[0] = cin;
    for (int k = 1; k <= NS; k++) begin
      logic acc;
      logic term;
      acc = 1'b0;
      for (int j = 0; j < k; j++) begin
        term = gg[j];
        for (int m = j + 1; m < k; m++) term = term & gp[m];
        acc = acc | term;
      end
      term = cin;
      for (int m = 0; m < k; m++) term = term & gp[m];
      sc[k] = acc | term;
    end
  end

  for (genvar k = 0; k < NS; k++) begin : g_slice
    cla8 #(.WIDTH(SLICE)) u_cla (
      .x   (x[k*SLICE +: SLICE]),
      .y   (y[k*SLICE +: SLICE]),
      .cin (sc[k]),
      .s   (s[k*SLICE +: SLICE]),
      .cout(co[k]),
      .gg  (gg[k]),
      .gp  (gp[k])
    );
  end

  // sc[NS] is C32 and co[] duplicates the lookahead carries: both unused.
  logic unused;
  assign unused = sc[NS] ^ (^co);
endmodule
