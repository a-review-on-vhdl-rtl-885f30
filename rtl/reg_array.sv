// Register array of the two-issue unit.
//
// NREGS registers of WIDTH bits with NR combinational read ports and NW
// write ports. All writes of a cycle take effect at the rising clock edge;
// when two ports write the same register in one cycle the higher-numbered
// port wins (the unit puts the ICALU on the highest port, so the result of
// the second, later instruction is the one kept). A read in the cycle of a
// write returns the old value. Synchronous active-low reset clears all
// registers. Register count and port arrangement are this design's choices.
module reg_array #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned NREGS = 16,
  parameter int unsigned NR    = 6,
  parameter int unsigned NW    = 3,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NR-1:0][AW-1:0]     raddr,
  output logic [NR-1:0][WIDTH-1:0]  rdata,
  input  logic [NW-1:0]             we,
  input  logic [NW-1:0][AW-1:0]     waddr,
  input  logic [NW-1:0][WIDTH-1:0]  wdata
);
  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else begin
      for (int w = 0; w < NW; w++)
        if (we[w]) regs[waddr[w]] <= wdata[w];
    end
  end

  always_comb
    for (int i = 0; i < NR; i++) rdata[i] = regs[raddr[i]];
endmodule
