// End-to-end test of the two-issue unit at its default size (32-bit data,
// 16 registers). Random programs of instruction pairs run on the unit and on
// a model that executes every instruction strictly in program order; after
// each pair all registers are compared through the debug port. Pairs are
// drawn from a small register window so that the interlocks occur often.
// Counted and required at least once: independent pairs, collapsed pairs of
// each category (arith-arith, logic-arith, arith-logic, logic-logic), both
// collapse forms (destination and source dependency), a reversed
// subtraction, and serialised pairs. Cycle counts are checked: one cycle per
// pair, two for a serialised pair.
module tb_icalu_parallel_unit;
  import icalu_pkg::*;
  logic              clk = 1'b0, rst_n = 1'b0;
  logic              pair_valid = 1'b0, pair_ready;
  insn_t             insn1 = '0, insn2 = '0;
  logic              load_we = 1'b0;
  logic [REG_AW-1:0] load_addr = '0, dbg_addr = '0;
  logic [DW-1:0]     load_data = '0, dbg_data;
  logic              retired, collapsed, serialized;

  logic [DW-1:0] model [NREGS];
  int checks = 0, failures = 0;
  int n_parallel = 0, n_collapse = 0, n_serial = 0, n_dest = 0, n_src = 0, n_rsub = 0;
  int n_cat [4] = '{default: 0};

  icalu_parallel_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all(string when);
    for (int i = 0; i < NREGS; i++) begin
      dbg_addr = REG_AW'(i);
      #1;
      checks++;
      if (dbg_data !== model[i]) begin
        failures++;
        if (failures < 10) $display("FAIL %s: R%0d = %h, expected %h", when, i, dbg_data, model[i]);
      end
    end
  endtask

  task automatic run_pair(insn_t i1, insn_t i2);
    int   k, need;
    logic dd, ds, rdy;
    dd = i2.rd == i1.rd;
    ds = i2.rs == i1.rd;
    need = (dd && ds) ? 2 : 1;
    @(negedge clk);
    insn1 = i1; insn2 = i2; pair_valid = 1'b1;
    k = 0;
    do begin
      #1;
      rdy = pair_ready;
      @(posedge clk);
      k++;
      @(negedge clk);
    end while (!rdy && k < 4);
    pair_valid = 1'b0;
    checks++;
    if (k != need) begin
      failures++;
      $display("FAIL cycle count %0d, expected %0d", k, need);
    end
    // model: program order
    model[i1.rd] = ref_op(i1.op, model[i1.rd], model[i1.rs]);
    model[i2.rd] = ref_op(i2.op, model[i2.rd], model[i2.rs]);
    if (dd && ds) n_serial++;
    else if (dd || ds) begin
      n_collapse++;
      if (dd) n_dest++; else n_src++;
      if (!dd && i2.op == OP_SUB) n_rsub++;
      n_cat[{~is_arith(i1.op), ~is_arith(i2.op)}]++;
    end else n_parallel++;
    compare_all("after pair");
  endtask

  // status outputs: count them as the unit reports them
  int st_collapsed = 0, st_serialized = 0, st_retired = 0;
  always @(posedge clk) if (rst_n) begin
    if (collapsed)  st_collapsed++;
    if (serialized) st_serialized++;
    if (retired)    st_retired++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (model[i]) model[i] = '0;
    // load random register contents
    for (int i = 0; i < NREGS; i++) begin
      @(negedge clk);
      load_we = 1'b1; load_addr = REG_AW'(i); load_data = (i == 0) ? 32'hffffffff : $urandom;
      model[i] = load_data;
    end
    @(negedge clk); load_we = 1'b0;
    compare_all("after load");

    // the interlocked pair of the text: ADD R2,R1 ; ADD R3,R2
    run_pair('{op: OP_ADD, rd: 2, rs: 1}, '{op: OP_ADD, rd: 3, rs: 2});
    // its collapsed form on the same destination: ADD A,B ; ADD A,C
    run_pair('{op: OP_ADD, rd: 4, rs: 5}, '{op: OP_ADD, rd: 4, rs: 6});
    // a non-interlocked pair: ADD R1,R2 ; ADD R4,R3
    run_pair('{op: OP_ADD, rd: 1, rs: 2}, '{op: OP_ADD, rd: 4, rs: 3});

    for (int n = 0; n < 3000; n++) begin
      insn_t i1, i2;
      int win;
      win = (n % 3 == 0) ? NREGS : 4;
      i1 = '{op: opcode_e'($urandom), rd: REG_AW'($urandom % win), rs: REG_AW'($urandom % win)};
      i2 = '{op: opcode_e'($urandom), rd: REG_AW'($urandom % win), rs: REG_AW'($urandom % win)};
      run_pair(i1, i2);
    end

    checks++;
    if (st_collapsed != n_collapse || st_serialized != n_serial ||
        st_retired != n_collapse + n_serial + n_parallel) begin
      failures++;
      $display("FAIL status counts: collapsed %0d/%0d serialized %0d/%0d retired %0d",
               st_collapsed, n_collapse, st_serialized, n_serial, st_retired);
    end
    $display("pairs: parallel %0d collapsed %0d (dest %0d, src %0d, reversed sub %0d) serial %0d",
             n_parallel, n_collapse, n_dest, n_src, n_rsub, n_serial);
    $display("collapsed by category: arith-arith %0d logic-arith %0d arith-logic %0d logic-logic %0d",
             n_cat[0], n_cat[2], n_cat[1], n_cat[3]);
    foreach (n_cat[i]) if (n_cat[i] == 0) failures++;
    if (n_parallel == 0 || n_serial == 0 || n_dest == 0 || n_src == 0 || n_rsub == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
