// tb_sram: random reads and writes against a reference array; checks the
// one-clock read latency, that nothing happens without MemEna or with both
// read and write high, and that an address marked faulty reads inverted.
module tb_sram;
  logic        clk = 1'b0, mem_en, wr_en, rd_en;
  logic [3:0]  addr;
  logic [7:0]  wdata, rdata, refm [16], e_rd;
  logic [15:0] fault_inject;
  int checks = 0, failures = 0;

  sram #(.ADDR_W(4), .DATA_W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    fault_inject = '0;
    mem_en = 1'b1; wr_en = 1'b1; rd_en = 1'b0;
    for (int a = 0; a < 16; a++) begin
      addr = 4'(a); wdata = 8'(a); refm[a] = 8'(a);
      @(negedge clk);
    end
    e_rd = rdata;
    for (int i = 0; i < 3000; i++) begin
      if (i == 1500) fault_inject = 16'h0800;   // address 1011
      mem_en = ($urandom % 4) != 0;
      {wr_en, rd_en} = 2'($urandom);
      addr = 4'($urandom); wdata = 8'($urandom);
      @(negedge clk);
      if (mem_en && rd_en && !wr_en) e_rd = fault_inject[addr] ? ~refm[addr] : refm[addr];
      if (mem_en && wr_en && !rd_en) refm[addr] = wdata;
      checks++;
      if (rdata != e_rd) begin failures++; $display("FAIL step %0d: %h expected %h", i, rdata, e_rd); end
    end
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
