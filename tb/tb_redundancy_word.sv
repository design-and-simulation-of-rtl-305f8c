// tb_redundancy_word: programs a word and checks the FA flag, stored address
// and data, the comparator, the write (IE) and read (OE) enables, and that
// nothing matches or is written while access is low or before programming.
module tb_redundancy_word;
  logic       clk = 1'b0, rst_n, program_en, access, wr, rd, fa, match, oe;
  logic [3:0] faulty_addr, addr, stored_addr;
  logic [7:0] correct_data, data, data_out, e_data;
  int checks = 0, failures = 0;

  redundancy_word #(.ADDR_W(4), .DATA_W(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; program_en = 1'b0; access = 1'b0; wr = 1'b0; rd = 1'b0;
    faulty_addr = 4'b1011; correct_data = 8'hFF; addr = 4'b1011; data = 8'h00;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    access = 1'b1; rd = 1'b1;
    #1 check(!fa && !match && !oe, "unprogrammed word matched");
    @(negedge clk);
    access = 1'b0; rd = 1'b0;
    program_en = 1'b1;
    @(negedge clk);
    program_en = 1'b0;
    check(fa && stored_addr == 4'b1011 && data_out == 8'hFF, "programming");
    e_data = 8'hFF;
    for (int i = 0; i < 1000; i++) begin
      access = $urandom % 2;
      {wr, rd} = 2'($urandom);
      addr = (($urandom % 2) != 0) ? 4'b1011 : 4'($urandom);
      data = 8'($urandom);
      #1;
      check(match == (addr == 4'b1011), "comparator");
      check(oe == (access && rd && addr == 4'b1011), "output enable");
      @(negedge clk);
      if (access && wr && addr == 4'b1011) e_data = data;
      check(data_out == e_data, $sformatf("data field %h expected %h", data_out, e_data));
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
