// tb_fault_diag: random compares; checks the fault pulse one clock after a
// mismatch with FDEna high (and never otherwise), the captured address and
// correct data, and the sticky fault flag.
module tb_fault_diag;
  logic       clk = 1'b0, rst_n, fd_ena, fault_pulse, fault_found;
  logic [7:0] expected, mem_out, correct_data, e_data;
  logic [3:0] addr, fault_addr, e_addr;
  logic       e_pulse, e_found;
  int checks = 0, failures = 0, n_faults = 0;

  fault_diag #(.ADDR_W(4), .DATA_W(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    rst_n = 1'b0; fd_ena = 1'b0; expected = '0; mem_out = '0; addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    e_pulse = 0; e_found = 0; e_addr = '0; e_data = '0;
    for (int i = 0; i < 1000; i++) begin
      fd_ena   = $urandom % 2;
      expected = ($urandom % 2) ? 8'hFF : 8'h00;
      mem_out  = (($urandom % 4) == 0) ? ~expected : expected;
      if (($urandom % 8) == 0) mem_out[$urandom % 8] ^= 1'b1;
      addr     = 4'($urandom);
      @(negedge clk);
      e_pulse = fd_ena && (mem_out != expected);
      if (e_pulse) begin e_found = 1; e_addr = addr; e_data = expected; n_faults++; end
      checks++;
      if (fault_pulse != e_pulse || fault_found != e_found ||
          fault_addr != e_addr || correct_data != e_data) begin
        failures++;
        $display("FAIL step %0d", i);
      end
    end
    checks++; if (n_faults == 0) failures++;
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
