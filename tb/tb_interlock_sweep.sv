// Workload test: instruction streams with a varying share of interlocked
// pairs, the quantity the performance of the unit depends on. For each share
// X (0, 3, 10, 25, 50, 75 and 100 percent) a stream of NPAIRS random pairs is
// generated in which exactly X percent are interlocked (collapsible: the
// second instruction depends on the first through rd or rs, never both). The
// stream runs on the unit; every register is compared with in-order execution
// after each pair, and the cycles are counted. The unit must take one cycle
// per pair whatever X is. The cycle count of an ordinary two-ALU machine,
// which needs two cycles for every interlocked pair, is reported next to it.
module tb_interlock_sweep;
  import icalu_pkg::*;
  localparam int NPAIRS = 200;
  logic              clk = 1'b0, rst_n = 1'b0;
  logic              pair_valid = 1'b0, pair_ready;
  insn_t             insn1 = '0, insn2 = '0;
  logic              load_we = 1'b0;
  logic [REG_AW-1:0] load_addr = '0, dbg_addr = '0;
  logic [DW-1:0]     load_data = '0, dbg_data;
  logic              retired, collapsed, serialized;

  logic [DW-1:0] model [NREGS];
  int checks = 0, failures = 0;

  icalu_parallel_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int i = 0; i < NREGS; i++) begin
      dbg_addr = REG_AW'(i);
      #1;
      checks++;
      if (dbg_data !== model[i]) begin
        failures++;
        if (failures < 10) $display("FAIL R%0d = %h, expected %h", i, dbg_data, model[i]);
      end
    end
  endtask

  function automatic insn_t rand_insn();
    return '{op: opcode_e'($urandom), rd: REG_AW'($urandom), rs: REG_AW'($urandom)};
  endfunction

  // a pair that is interlocked through rd or rs only
  task automatic make_interlocked(output insn_t i1, output insn_t i2);
    i1 = rand_insn();
    i2 = rand_insn();
    if ($urandom % 2 != 0) begin
      i2.rd = i1.rd;
      while (i2.rs == i1.rd) i2.rs = REG_AW'($urandom);
    end else begin
      i2.rs = i1.rd;
      while (i2.rd == i1.rd) i2.rd = REG_AW'($urandom);
    end
  endtask

  task automatic make_independent(output insn_t i1, output insn_t i2);
    i1 = rand_insn();
    i2 = rand_insn();
    while (i2.rd == i1.rd) i2.rd = REG_AW'($urandom);
    while (i2.rs == i1.rd) i2.rs = REG_AW'($urandom);
  endtask

  initial begin
    automatic int shares [7] = '{0, 3, 10, 25, 50, 75, 100};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (shares[s]) begin
      int n_il, cycles, n_coll;
      // fresh register contents
      for (int i = 0; i < NREGS; i++) begin
        @(negedge clk);
        load_we = 1'b1; load_addr = REG_AW'(i); load_data = $urandom;
        model[i] = load_data;
      end
      @(negedge clk); load_we = 1'b0;
      n_il = (shares[s] * NPAIRS) / 100;
      cycles = 0; n_coll = 0;
      for (int n = 0; n < NPAIRS; n++) begin
        insn_t i1, i2;
        logic  rdy;
        // spread the interlocked pairs over the stream
        if ((n * n_il) / NPAIRS != ((n + 1) * n_il) / NPAIRS) make_interlocked(i1, i2);
        else                                                    make_independent(i1, i2);
        @(negedge clk);
        insn1 = i1; insn2 = i2; pair_valid = 1'b1;
        do begin
          #1;
          rdy = pair_ready;
          if (collapsed) n_coll++;
          @(posedge clk);
          cycles++;
          @(negedge clk);
        end while (!rdy && cycles < 10 * NPAIRS);
        pair_valid = 1'b0;
        model[i1.rd] = ref_op(i1.op, model[i1.rd], model[i1.rs]);
        model[i2.rd] = ref_op(i2.op, model[i2.rd], model[i2.rs]);
        compare_all();
      end
      checks++;
      if (cycles != NPAIRS || n_coll != n_il) begin
        failures++;
        $display("FAIL share %0d%%: %0d cycles, %0d collapsed", shares[s], cycles, n_coll);
      end
      $display("interlocked %3d%%: %0d pairs, %0d interlocked, unit %0d cycles, two 2-1 ALUs %0d cycles",
               shares[s], NPAIRS, n_il, cycles, NPAIRS + n_il);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
