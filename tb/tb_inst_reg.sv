// tb_inst_reg: loads random words into the instruction register and checks
// that it holds them while disabled, decodes them into the right fields and
// clears on reset.
module tb_inst_reg;
  import bisr_pkg::*;
  logic       clk = 1'b0, rst_n, ir_ena;
  microword_t inst_in, ir;
  logic [6:0] expv;
  int checks = 0, failures = 0;

  inst_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    rst_n = 1'b0; ir_ena = 1'b0; inst_in = '1;
    repeat (2) @(negedge clk);
    checks++; if (ir != '0) failures++;
    rst_n = 1'b1; expv = '0;
    for (int i = 0; i < 500; i++) begin
      inst_in = microword_t'($urandom);
      ir_ena = $urandom % 2;
      @(negedge clk);
      if (ir_ena) expv = inst_in;
      checks++;
      if (ir != expv || ir.valid != expv[6] || ir.fo != expv[5] || ir.io != expv[4] ||
          ir.lo != expv[3] || ir.down != expv[2] || ir.wr != expv[1] || ir.data != expv[0]) begin
        failures++;
        $display("FAIL: ir %b expected %b", ir, expv);
      end
    end
    rst_n = 1'b0;
    #1;
    checks++; if (ir != '0) failures++;
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
