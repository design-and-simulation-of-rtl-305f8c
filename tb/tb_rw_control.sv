// tb_rw_control: checks that WrEna follows the R/W bit and RdEna its inverse
// when enabled, that both hold otherwise and that reset clears both.
module tb_rw_control;
  logic clk = 1'b0, rst_n, rw_ena, rw_bit, wr_ena, rd_ena;
  logic ew, er;
  int checks = 0, failures = 0;

  rw_control dut (.*);
  always #5 clk = ~clk;

  initial begin
    rst_n = 1'b0; rw_ena = 1'b0; rw_bit = 1'b1;
    repeat (2) @(negedge clk);
    checks++; if (wr_ena || rd_ena) failures++;
    rst_n = 1'b1; ew = 1'b0; er = 1'b0;
    for (int i = 0; i < 500; i++) begin
      rw_ena = $urandom % 2;
      rw_bit = $urandom % 2;
      @(negedge clk);
      if (rw_ena) begin ew = rw_bit; er = !rw_bit; end
      checks++;
      if (wr_ena != ew || rd_ena != er) begin failures++; $display("FAIL step %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
