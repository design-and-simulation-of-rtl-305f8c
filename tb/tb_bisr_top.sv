// tb_bisr_top: end-to-end test of the self-test-and-repair memory at its
// default sizes (16 x 8 memory, 4 redundant words).
//
// Scenario 1: fault-free memory. Runs the March BLC test and checks every
// memory operation (address, read/write, data) against a March BLC expansion
// built here from the algorithm's element list, the 46n operation count and
// the run time (5 clocks per write, 6 per read, per address), then normal
// reads and writes.
// Scenario 2: deceptive-read fault at address 1011. The test must find it,
// program one redundant word, and normal-mode reads of 1011 must return the
// written data, not its inverse.
// Scenario 3: five faulty addresses with four redundant words: the array
// must report overflow (not repairable).
// Each mechanism (fault pulse, word programming, duplicate fault ignored,
// overflow, mode switch, repaired read, element loop-back, descending
// element, single-operation element) is counted and must occur.
module tb_bisr_top;
  import bisr_pkg::*;

  localparam int unsigned AW = 4, DW = 8, NW = 16;

  logic          clk = 1'b0;
  logic          rst_n, test_mode, start, wr_in, rd_in;
  logic [NW-1:0] fault_inject;
  logic [AW-1:0] addr_in;
  logic [DW-1:0] data_in, data_out;
  logic          test_done, fault_found, not_repairable;
  logic [2:0]    red_used;

  int checks = 0, failures = 0;
  int n_fault_pulse = 0, n_program = 0, n_dup = 0, n_overflow = 0, n_mode_switch = 0;
  int n_repaired_read = 0, n_loopback = 0, n_down_elem = 0, n_single = 0;

  bisr_top dut (.*, .clk);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Expected March BLC operation stream, built from the element list.
  typedef struct { bit wr; bit d; } op_t;
  op_t exp_ops [$];
  bit  exp_wr[$], exp_d[$];
  logic [AW-1:0] exp_a[$];

  function automatic void build_expected();
    string elems [9] = '{"w0", "r0r0w0r0w1w1r1", "r1r1w1r1w0w1", "r1r1w0w0r0",
                         "r0r0w0r0w1w1w0", "r0r0w0w1w1r1", "r1r1w0w1", "r1r1w0w0r0",
                         "r0r0w1w1w0"};
    bit down [9] = '{0, 0, 0, 0, 0, 1, 1, 1, 1};
    exp_wr.delete(); exp_d.delete(); exp_a.delete();
    for (int e = 0; e < 9; e++)
      for (int i = 0; i < NW; i++) begin
        int a = down[e] ? NW - 1 - i : i;
        for (int k = 0; k < elems[e].len(); k += 2) begin
          exp_wr.push_back(elems[e][k] == "w");
          exp_d.push_back(elems[e][k+1] == "1");
          exp_a.push_back(AW'(a));
        end
      end
  endfunction

  // Monitor of the memory-side test operations.
  int op_idx;
  bit monitor_on;
  // Monitors sample at the falling edge, where the design's signals are stable.
  always @(negedge clk) begin
    if (monitor_on && test_mode && dut.m_mem_en) begin
      if (op_idx < exp_a.size()) begin
        check(dut.m_addr == exp_a[op_idx] && dut.m_wr == exp_wr[op_idx] &&
              dut.m_rd == !exp_wr[op_idx] && dut.m_data == {DW{exp_d[op_idx]}},
              $sformatf("op %0d: addr %h wr %b data %h", op_idx, dut.m_addr, dut.m_wr, dut.m_data));
      end else check(0, "more memory operations than March BLC has");
      op_idx++;
    end
  end

  // Mechanism counters.
  logic tm_q = 1'b0;
  always @(negedge clk) begin
    tm_q <= test_mode;
    if (rst_n && tm_q != test_mode) n_mode_switch++;
    if (dut.fault_pulse) begin
      n_fault_pulse++;
      if (|dut.u_rla.prog) n_program++;
      if (dut.u_rla.any_dup) n_dup++;
      if (dut.u_rla.full && !dut.u_rla.any_dup) n_overflow++;
    end
    if (dut.u_mbist.inst_ena && dut.u_mbist.ir.lo && !dut.u_mbist.over) n_loopback++;
    if (dut.u_mbist.addr_load && dut.u_mbist.ir.down) n_down_elem++;
    if (dut.u_mbist.inst_ena && {dut.u_mbist.ir.fo, dut.u_mbist.ir.io, dut.u_mbist.ir.lo} == 3'b000
        && dut.u_mbist.ir.valid) n_single++;
    if (dut.red_hit) n_repaired_read++;
  end

  task automatic do_reset();
    rst_n = 1'b0; start = 1'b0; wr_in = 1'b0; rd_in = 1'b0;
    addr_in = '0; data_in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
  endtask

  task automatic run_test(output int cycles);
    test_mode = 1'b1;
    op_idx = 0; monitor_on = 1'b1;
    @(negedge clk);
    start = 1'b1;
    cycles = 0;
    while (!test_done) begin
      @(negedge clk);
      cycles++;
    end
    start = 1'b0;
    monitor_on = 1'b0;
    @(negedge clk);
    test_mode = 1'b0;
    @(negedge clk);
  endtask

  task automatic nwrite(input logic [AW-1:0] a, input logic [DW-1:0] d);
    addr_in = a; data_in = d; wr_in = 1'b1; rd_in = 1'b0;
    @(negedge clk);
    wr_in = 1'b0;
  endtask

  task automatic nread(input logic [AW-1:0] a, output logic [DW-1:0] d);
    addr_in = a; rd_in = 1'b1; wr_in = 1'b0;
    @(negedge clk);
    rd_in = 1'b0;
    d = data_out;
  endtask

  int cycles, exp_cycles, n_reads, n_writes;
  logic [DW-1:0] rd;

  initial begin
    test_mode = 1'b0; fault_inject = '0; monitor_on = 1'b0;
    build_expected();
    n_reads = 0; n_writes = 0;
    foreach (exp_wr[i]) if (exp_wr[i]) n_writes++; else n_reads++;
    check(exp_a.size() == BLC_OPS * NW, "March BLC is a 46n test");
    // one idle clock, 5 or 6 clocks per operation, 3 to fetch and decode the end word
    exp_cycles = 5 * n_writes + 6 * n_reads + 4;

    // Scenario 1: fault free.
    do_reset();
    run_test(cycles);
    check(op_idx == BLC_OPS * NW, $sformatf("operations %0d, expected %0d", op_idx, BLC_OPS * NW));
    check(cycles == exp_cycles, $sformatf("test took %0d cycles, expected %0d", cycles, exp_cycles));
    check(!fault_found && red_used == 0 && !not_repairable, "fault-free memory reported faulty");
    for (int a = 0; a < NW; a++) nwrite(AW'(a), DW'(8'h30 + a));
    for (int a = NW - 1; a >= 0; a--) begin
      nread(AW'(a), rd);
      check(rd == DW'(8'h30 + a), $sformatf("normal read %0d gave %h", a, rd));
    end

    // Scenario 2: deceptive read fault at 1011.
    fault_inject = NW'(1) << 4'b1011;
    do_reset();
    run_test(cycles);
    check(fault_found, "fault at 1011 not found");
    check(red_used == 1 && !not_repairable, $sformatf("redundant words used %0d", red_used));
    check(dut.u_rla.stored[0] == 4'b1011, "redundant word holds wrong address");
    nwrite(4'b1011, 8'hA5);
    nwrite(4'b0011, 8'h5A);
    nread(4'b1011, rd);
    check(rd == 8'hA5, $sformatf("repaired read of 1011 gave %h", rd));
    check(dut.mem_rdata == 8'h5A, "faulty memory word should read inverted");
    nread(4'b0011, rd);
    check(rd == 8'h5A, $sformatf("read of 0011 gave %h", rd));
    nwrite(4'b1011, 8'hFF);
    nread(4'b1011, rd);
    check(rd == 8'hFF, $sformatf("repaired read of 1011 gave %h", rd));

    // Scenario 3: more faults than redundant words.
    fault_inject = 16'b1000_0100_0010_0101;
    do_reset();
    run_test(cycles);
    check(fault_found && not_repairable, "overflow not reported");
    check(red_used == 4, $sformatf("redundant words used %0d", red_used));

    // Scenario 4: as many faults as redundant words: all repaired.
    fault_inject = 16'b0001_0000_1000_0010;
    do_reset();
    run_test(cycles);
    check(fault_found && !not_repairable && red_used == 3, "three faults should fit");
    for (int a = 0; a < NW; a++) nwrite(AW'(a), DW'(a * 7));
    for (int a = 0; a < NW; a++) begin
      nread(AW'(a), rd);
      check(rd == DW'(a * 7), $sformatf("read %0d after repair gave %h", a, rd));
    end

    check(n_fault_pulse > 0, "no fault pulse");
    check(n_program > 0, "no redundant word programmed");
    check(n_dup > 0, "no repeated fault ignored");
    check(n_overflow > 0, "no overflow");
    check(n_mode_switch > 0, "no mode switch");
    check(n_repaired_read > 0, "no read served by a redundant word");
    check(n_loopback > 0, "no element loop-back");
    check(n_down_elem > 0, "no descending element");
    check(n_single > 0, "no single-operation element");
    $display("mechanisms: fault_pulse=%0d program=%0d dup=%0d overflow=%0d mode_switch=%0d repaired_read=%0d loopback=%0d down_elem=%0d single=%0d",
             n_fault_pulse, n_program, n_dup, n_overflow, n_mode_switch, n_repaired_read,
             n_loopback, n_down_elem, n_single);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
