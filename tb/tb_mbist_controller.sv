// tb_mbist_controller: runs the controller against a memory model in the
// testbench (16 x 8, one word whose reads come back inverted). Checks the
// operation count of March BLC (46 per address), that every read's expected
// data equals what the model holds for a good word, and that faults are
// reported, once per read of the bad word that the model flags, with its
// address and the correct data. Also checks done and the fault-free run.
module tb_mbist_controller;
  logic       clk = 1'b0, rst_n, start;
  logic [7:0] mem_rdata, t_data, correct_data;
  logic [3:0] t_addr, fault_addr;
  logic       t_wr, t_rd, t_mem_en, fault_pulse, done, fault_found;
  int checks = 0, failures = 0;

  logic [7:0] model [16];
  int         bad;          // faulty address, -1 for none
  int         n_ops, n_reads_bad, n_pulses;

  mbist_controller #(.ADDR_W(4), .DATA_W(8), .IA_W(6)) dut (.*);
  always #5 clk = ~clk;

  // The model samples the controller's outputs at the falling edge, where
  // they are stable, and acts on them at the next rising edge.
  logic       s_en, s_wr;
  logic [3:0] s_addr;
  logic [7:0] s_data;
  always @(negedge clk) begin
    s_en = t_mem_en; s_wr = t_wr; s_addr = t_addr; s_data = t_data;
    if (t_mem_en) begin
      n_ops++;
      if (!t_wr) begin
        if (int'(t_addr) == bad) n_reads_bad++;
        else begin
          checks++;
          if (model[t_addr] != t_data) begin
            failures++;
            $display("FAIL: read of %0d expects %h, memory holds %h", t_addr, t_data, model[t_addr]);
          end
        end
      end
    end
    if (fault_pulse) begin
      n_pulses++;
      checks++;
      if (int'(fault_addr) != bad || correct_data != model[fault_addr]) begin
        failures++;
        $display("FAIL: fault reported at %0d data %h", fault_addr, correct_data);
      end
    end
  end

  always @(posedge clk) begin
    if (s_en) begin
      if (s_wr) model[s_addr] <= s_data;
      else mem_rdata <= (int'(s_addr) == bad) ? ~model[s_addr] : model[s_addr];
    end
  end

  task automatic run(input int b);
    bad = b; n_ops = 0; n_reads_bad = 0; n_pulses = 0;
    rst_n = 1'b0; start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    start = 1'b1;
    wait (done);
    @(negedge clk);
    start = 1'b0;
    checks++;
    if (n_ops != 46 * 16) begin failures++; $display("FAIL: %0d operations", n_ops); end
    checks++;
    if (fault_found != (b >= 0)) begin failures++; $display("FAIL: fault_found %b", fault_found); end
    checks++;
    if (n_pulses != n_reads_bad) begin
      failures++; $display("FAIL: %0d pulses for %0d bad reads", n_pulses, n_reads_bad);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    mem_rdata = '0; s_en = 1'b0; bad = -1;
    run(-1);
    run(11);
    checks++; if (n_reads_bad != 23) begin failures++; $display("FAIL: %0d reads of the bad word", n_reads_bad); end
    run(0);
    run(15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
