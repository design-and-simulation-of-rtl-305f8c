// tb_data_gen: checks that the data generator produces 8'hFF or 8'h00 from
// the data bit when enabled, holds otherwise and resets to zero.
module tb_data_gen;
  logic       clk = 1'b0, rst_n, data_ena, data_bit;
  logic [7:0] data, expv;
  int checks = 0, failures = 0;

  data_gen #(.DATA_W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    rst_n = 1'b0; data_ena = 1'b0; data_bit = 1'b1;
    repeat (2) @(negedge clk);
    checks++; if (data != 8'h00) failures++;
    rst_n = 1'b1; expv = 8'h00;
    for (int i = 0; i < 500; i++) begin
      data_ena = $urandom % 2;
      data_bit = $urandom % 2;
      @(negedge clk);
      if (data_ena) expv = data_bit ? 8'hFF : 8'h00;
      checks++;
      if (data != expv) begin failures++; $display("FAIL: %h expected %h", data, expv); end
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
