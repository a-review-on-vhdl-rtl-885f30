// 8-bit carry lookahead adder slice.
//
// Bit generate g = x.y and propagate p = x xor y; every internal carry is
// computed directly from g, p and the slice carry input (two-level lookahead,
// no ripple). The sum bits use the SUM3_1 cell. The slice also returns its
// group generate and propagate so that a second lookahead level can build
// wider adders, and its carry out. The slice is WIDTH bits wide, 8 by
// default. The 8-bit slice and the SUM3_1 sum cells follow the original
// design; the lookahead equations are the textbook ones, and the group
// outputs are this design's addition. Purely combinational.
module cla8 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout,
  output logic             gg,   // group generate
  output logic             gp    // group propagate
);
  logic [WIDTH-1:0] g, p;
  logic [WIDTH:0]   c;

  assign g = x & y;
  assign p = x ^ y;

  // c[i] = g[i-1] + p[i-1].g[i-2] + ... + p[i-1]...p[0].cin
  always_comb begin
    c[0] = cin;
    for (int i = 1; i <= WIDTH; i++) begin
      logic term;
      logic acc;
      acc = 1'b0;
      for (int j = 0; j < i; j++) begin
        term = g[j];
        for (int k = j + 1; k < i; k++) term = term & p[k];
        acc = acc | term;
      end
      term = cin;
      for (int k = 0; k < i; k++) term = term & p[k];
      c[i] = acc | term;
    end
  end

  for (genvar i = 0; i < WIDTH; i++) begin : g_sum
    sum3_1 u_sum (.a(x[i]), .b(y[i]), .c(c[i]), .s(s[i]));
  end

  assign cout = c[WIDTH];

  always_comb begin
    gg = 1'b0;
    for (int j = 0; j < WIDTH; j++) begin
      logic term;
      term = g[j];
      for (int k = j + 1; k < WIDTH; k++) term = term & p[k];
      gg = gg | term;
    end
    gp = &p;
  end
endmodule
