// tb_smc_controller: plays the instruction register for the sequencer and
// checks, clock by clock, the enable pattern of write operations (5 clocks),
// read operations (6 clocks, FDEna in the sixth), address load only at the
// start of an element, address step only after the last or only operation
// of an element when not over, and done after an invalid word.
module tb_smc_controller;
  logic       clk = 1'b0, rst_n, start, valid, rw_bit, over;
  logic [2:0] inst_op;
  logic       inst_ena, iena, ir_ena, addr_ena, addr_load, data_ena, rw_ena, mem_ena, fd_ena, done;
  int checks = 0, failures = 0;

  smc_controller dut (.*);
  always #5 clk = ~clk;

  // outputs packed: {iena, ir_ena, data_ena, rw_ena, addr_load, mem_ena, fd_ena, inst_ena, addr_ena, done}
  function automatic logic [9:0] outs();
    return {iena, ir_ena, data_ena, rw_ena, addr_load, mem_ena, fd_ena, inst_ena, addr_ena, done};
  endfunction

  task automatic expect_outs(input logic [9:0] e, input string what);
    checks++;
    if (outs() != e) begin
      failures++;
      $display("FAIL %s: outputs %b expected %b", what, outs(), e);
    end
  endtask

  // Called in the FETCH clock of an operation (sampled after the negedge).
  task automatic run_op(input logic v, input logic [2:0] op, input logic w, input logic ov,
                        input logic load);
    logic step;
    step = (op[0] || op == 3'b000) && !ov;
    expect_outs(10'b1000000000, "FETCH");
    @(negedge clk);
    expect_outs(10'b0100000000, "LOAD");
    valid = v; inst_op = op; rw_bit = w; over = ov;   // instruction register loads here
    @(negedge clk);
    expect_outs({2'b00, v, v, v && load, 5'b00000}, "DECODE");
    @(negedge clk);
    if (!v) begin
      expect_outs(10'b0000000001, "DONE");
      return;
    end
    expect_outs(10'b0000010000, "EXEC");
    @(negedge clk);
    if (!w) begin
      expect_outs(10'b0000001000, "CMP");
      @(negedge clk);
    end
    expect_outs({7'b0000000, 1'b1, step, 1'b0}, "NEXT");
    @(negedge clk);
  endtask

  int t0, cyc;

  initial begin
    rst_n = 1'b0; start = 1'b0; valid = 1'b0; inst_op = '0; rw_bit = 1'b0; over = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    expect_outs('0, "IDLE");
    start = 1'b1;
    @(negedge clk);
    // single-operation element, two addresses: load once, step once
    run_op(1, 3'b000, 1, 0, 1);
    run_op(1, 3'b000, 1, 1, 0);
    // three-operation element over two addresses
    run_op(1, 3'b100, 0, 0, 1);
    run_op(1, 3'b010, 1, 0, 0);
    run_op(1, 3'b001, 0, 0, 0);
    run_op(1, 3'b100, 0, 1, 0);
    run_op(1, 3'b010, 1, 1, 0);
    run_op(1, 3'b001, 0, 1, 0);
    // next element loads again
    t0 = $time;
    run_op(1, 3'b000, 0, 1, 1);
    cyc = ($time - t0) / 10;
    checks++; if (cyc != 6) begin failures++; $display("FAIL: read took %0d clocks", cyc); end
    t0 = $time;
    run_op(1, 3'b100, 1, 0, 1);
    cyc = ($time - t0) / 10;
    checks++; if (cyc != 5) begin failures++; $display("FAIL: write took %0d clocks", cyc); end
    run_op(1, 3'b001, 1, 1, 0);
    run_op(0, 3'b000, 0, 0, 0);
    @(negedge clk);
    expect_outs(10'b0000000001, "DONE holds");
    start = 1'b0;
    @(negedge clk);
    expect_outs('0, "back to IDLE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
