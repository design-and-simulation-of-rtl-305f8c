// tb_redundancy_array: follows the repair flowchart. In test mode, fault
// pulses with new addresses fill the words in order, repeated addresses are
// ignored, and a new address with all words full sets overflow. In normal
// mode, random accesses are checked against a reference model: reads of a
// repaired address return the redundant word (hit_q), other reads do not hit.
module tb_redundancy_array;
  localparam int N = 4;
  logic       clk = 1'b0, rst_n, test_mode, fault_pulse, mem_en, wr, rd, hit_q, overflow;
  logic [3:0] fault_addr, addr;
  logic [7:0] correct_data, wdata, rdata_q;
  logic [2:0] used;
  int checks = 0, failures = 0;

  logic [3:0] r_addr [N];
  logic [7:0] r_data [N];
  int         r_used;
  logic       e_hit;
  logic [7:0] e_rdata;

  redundancy_array #(.ADDR_W(4), .DATA_W(8), .N_RED(N)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pulse(input logic [3:0] a, input logic [7:0] d);
    fault_pulse = 1'b1; fault_addr = a; correct_data = d;
    @(negedge clk);
    fault_pulse = 1'b0;
    @(negedge clk);
  endtask

  function automatic int find(input logic [3:0] a);
    for (int i = 0; i < r_used; i++) if (r_addr[i] == a) return i;
    return -1;
  endfunction

  initial begin
    rst_n = 1'b0; test_mode = 1'b1; fault_pulse = 1'b0; mem_en = 1'b0; wr = 1'b0; rd = 1'b0;
    fault_addr = '0; correct_data = '0; addr = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    pulse(4'd11, 8'hFF);
    check(used == 1 && !overflow, "first word");
    pulse(4'd11, 8'h00);
    check(used == 1 && !overflow, "repeated address ignored");
    pulse(4'd3, 8'h00);
    pulse(4'd7, 8'hFF);
    check(used == 3 && !overflow, "three words");
    // a test-mode read of a repaired address must not hit
    mem_en = 1'b1; rd = 1'b1; addr = 4'd11;
    @(negedge clk);
    mem_en = 1'b0; rd = 1'b0;
    check(!hit_q, "hit in test mode");
    r_addr = '{4'd11, 4'd3, 4'd7, 4'd0}; r_data = '{8'hFF, 8'h00, 8'hFF, 8'h00}; r_used = 3;

    // normal mode with three repaired words
    test_mode = 1'b0; e_hit = 1'b0; e_rdata = '0;
    for (int i = 0; i < 1500; i++) begin
      mem_en = $urandom % 2;
      {wr, rd} = 2'($urandom);
      addr = (($urandom % 2) != 0) ? r_addr[$urandom % 3] : 4'($urandom);
      wdata = 8'($urandom);
      @(negedge clk);
      if (mem_en && rd && !wr) begin
        e_hit = find(addr) >= 0;
        if (e_hit) e_rdata = r_data[find(addr)];
      end
      if (mem_en && wr && find(addr) >= 0) r_data[find(addr)] = wdata;
      check(hit_q == e_hit && (!e_hit || rdata_q == e_rdata),
            $sformatf("step %0d: hit %b data %h, expected %b %h", i, hit_q, rdata_q, e_hit, e_rdata));
    end
    check(used == 3 && !overflow, "normal mode changed the fill");

    // fill the last word, then overflow
    mem_en = 1'b0; wr = 1'b0; rd = 1'b0;
    test_mode = 1'b1;
    pulse(4'd0, 8'h00);
    check(used == 4 && !overflow, "four words");
    pulse(4'd3, 8'hFF);
    check(used == 4 && !overflow, "repeated address on a full array");
    pulse(4'd9, 8'hFF);
    check(used == 4 && overflow, "overflow not set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
