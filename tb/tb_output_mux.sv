// tb_output_mux: checks the selection between memory and redundant data.
module tb_output_mux;
  logic       sel_red;
  logic [7:0] mem_data, red_data, data_out;
  int checks = 0, failures = 0;

  output_mux #(.DATA_W(8)) dut (.*);

  initial begin
    for (int i = 0; i < 500; i++) begin
      sel_red = $urandom % 2; mem_data = 8'($urandom); red_data = 8'($urandom);
      #1;
      checks++;
      if (data_out != (sel_red ? red_data : mem_data)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
