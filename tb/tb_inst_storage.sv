// tb_inst_storage: reads the whole microcode store and checks it against the
// March BLC element list written out here: 46 valid words with the right
// Fo/Io/Lo, order, read/write and data bits, then end-of-test words; also
// checks the one-clock read latency and that the output holds with iena low.
module tb_inst_storage;
  import bisr_pkg::*;
  logic       clk = 1'b0, rst_n, iena;
  logic [5:0] inst_addr;
  microword_t inst;
  int checks = 0, failures = 0;

  inst_storage #(.IA_W(6)) dut (.*);
  always #5 clk = ~clk;

  string elems [9] = '{"w0", "r0r0w0r0w1w1r1", "r1r1w1r1w0w1", "r1r1w0w0r0",
                       "r0r0w0r0w1w1w0", "r0r0w0w1w1r1", "r1r1w0w1", "r1r1w0w0r0",
                       "r0r0w1w1w0"};
  logic [6:0] expw [64];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int n = 0;
    foreach (expw[i]) expw[i] = '0;
    for (int e = 0; e < 9; e++) begin
      automatic int len = elems[e].len() / 2;
      for (int k = 0; k < len; k++) begin
        automatic logic fo, io, lo;
        fo = (len > 1) && (k == 0);
        lo = (len > 1) && (k == len - 1);
        io = (k > 0) && (k < len - 1);
        expw[n] = {1'b1, fo, io, lo, 1'(e >= 5), 1'(elems[e][2*k] == "w"), 1'(elems[e][2*k+1] == "1")};
        n++;
      end
    end
    check(n == 46, "46 operations");
    rst_n = 1'b0; iena = 1'b0; inst_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 64; a++) begin
      inst_addr = 6'(a); iena = 1'b1;
      @(negedge clk);
      check(inst == expw[a], $sformatf("word %0d = %b, expected %b", a, inst, expw[a]));
      iena = 1'b0; inst_addr = 6'(a + 1);
      @(negedge clk);
      check(inst == expw[a], $sformatf("word %0d not held", a));
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
