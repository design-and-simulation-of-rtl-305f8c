// tb_inst_ptr: checks the instruction pointer's moves for each Fo/Io/Lo code
// against a reference model kept in the testbench, with random codes and
// random over flags, plus reset to zero.
module tb_inst_ptr;
  logic       clk = 1'b0, rst_n, inst_ena, over;
  logic [2:0] inst_op;
  logic [5:0] inst_addr;
  int checks = 0, failures = 0;
  int ref_addr, ref_start;

  inst_ptr #(.IA_W(6)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    rst_n = 1'b0; inst_ena = 1'b0; over = 1'b0; inst_op = '0;
    repeat (2) @(negedge clk);
    checks++; if (inst_addr !== 6'd0) failures++;
    rst_n = 1'b1;
    ref_addr = 0; ref_start = 0;
    for (int i = 0; i < 2000; i++) begin
      inst_ena = ($urandom % 4) != 0;
      case ($urandom % 4)
        0: inst_op = 3'b100;
        1: inst_op = 3'b010;
        2: inst_op = 3'b001;
        default: inst_op = 3'b000;
      endcase
      over = $urandom % 2;
      @(negedge clk);
      if (inst_ena) begin
        case (inst_op)
          3'b100: begin ref_start = ref_addr; ref_addr = (ref_addr + 1) % 64; end
          3'b010: ref_addr = (ref_addr + 1) % 64;
          3'b001: ref_addr = over ? (ref_addr + 1) % 64 : ref_start;
          default: ref_addr = over ? (ref_addr + 1) % 64 : ref_addr;
        endcase
      end
      checks++;
      if (inst_addr != 6'(ref_addr)) begin
        failures++;
        $display("FAIL step %0d: addr %0d expected %0d", i, inst_addr, ref_addr);
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
