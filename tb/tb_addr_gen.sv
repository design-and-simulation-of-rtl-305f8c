// tb_addr_gen: checks load, up and down stepping with wrap, hold, and the
// over flag of the address generator against a reference counter.
module tb_addr_gen;
  logic       clk = 1'b0, rst_n, addr_ena, addr_load, down, over;
  logic [3:0] addr;
  int checks = 0, failures = 0;
  int r;

  addr_gen #(.ADDR_W(4)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    rst_n = 1'b0; addr_ena = 1'b0; addr_load = 1'b0; down = 1'b0;
    repeat (2) @(negedge clk);
    checks++; if (addr != 0) failures++;
    rst_n = 1'b1; r = 0;
    for (int i = 0; i < 2000; i++) begin
      addr_load = ($urandom % 10) == 0;
      addr_ena  = $urandom % 2;
      if (($urandom % 8) == 0) down = !down;
      @(negedge clk);
      if (addr_load) r = down ? 15 : 0;
      else if (addr_ena) r = down ? (r + 15) % 16 : (r + 1) % 16;
      checks++;
      if (addr != 4'(r) || over != (down ? (r == 0) : (r == 15))) begin
        failures++;
        $display("FAIL step %0d: addr %0d over %b expected %0d", i, addr, over, r);
      end
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
