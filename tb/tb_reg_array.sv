// Self-check of the register array: random writes on all ports (including
// same-register collisions, where the higher port must win), random reads
// compared with a model array, and the synchronous reset.
module tb_reg_array;
  localparam int W = 32, N = 16, NR = 6, NW = 3, AW = 4;
  logic                    clk = 1'b0, rst_n = 1'b0;
  logic [NR-1:0][AW-1:0]   raddr;
  logic [NR-1:0][W-1:0]    rdata;
  logic [NW-1:0]           we;
  logic [NW-1:0][AW-1:0]   waddr;
  logic [NW-1:0][W-1:0]    wdata;
  logic [W-1:0]            model [N];
  int checks = 0, failures = 0, collisions = 0;

  reg_array dut (.*);  // default size: 32 bits x 16, 6 read and 3 write ports

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; waddr = '0; wdata = '0; raddr = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < N; i++) begin
      raddr[0] = AW'(i); #1;
      checks++;
      if (rdata[0] !== '0) failures++;
    end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      for (int w = 0; w < NW; w++) begin
        we[w] = 1'($urandom); waddr[w] = AW'($urandom % 4 == 0 ? 3 : $urandom); wdata[w] = $urandom;
      end
      for (int r = 0; r < NR; r++) raddr[r] = AW'($urandom);
      #1;
      for (int r = 0; r < NR; r++) begin
        checks++;
        if (rdata[r] !== model[raddr[r]]) begin
          failures++;
          if (failures < 10) $display("FAIL read port %0d addr %0d got %h exp %h", r, raddr[r], rdata[r], model[raddr[r]]);
        end
      end
      if (we[1] && we[2] && waddr[1] == waddr[2]) collisions++;
      for (int w = 0; w < NW; w++) if (we[w]) model[waddr[w]] = wdata[w];
      @(posedge clk);
    end
    // reset clears everything
    @(negedge clk); we = '0; rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < N; i++) begin
      raddr[0] = AW'(i); #1;
      checks++;
      if (rdata[0] !== '0) failures++;
    end
    if (collisions == 0) failures++;
    $display("write collisions exercised: %0d", collisions);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
