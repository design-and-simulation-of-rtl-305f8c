// tb_input_mux: random inputs in both modes; checks that test mode passes the
// test collar and normal mode the normal request, with the memory enable
// high for exactly one of read or write.
module tb_input_mux;
  logic       test_mode, t_wr, t_rd, t_mem_en, n_wr, n_rd, m_wr, m_rd, m_mem_en;
  logic [3:0] t_addr, n_addr, m_addr;
  logic [7:0] t_data, n_data, m_data;
  int checks = 0, failures = 0;

  input_mux #(.ADDR_W(4), .DATA_W(8)) dut (.*);

  initial begin
    for (int i = 0; i < 1000; i++) begin
      {test_mode, t_wr, t_rd, t_mem_en, n_wr, n_rd} = 6'($urandom);
      t_addr = 4'($urandom); n_addr = 4'($urandom);
      t_data = 8'($urandom); n_data = 8'($urandom);
      #1;
      checks++;
      if (test_mode) begin
        if (m_addr != t_addr || m_data != t_data || m_wr != t_wr || m_rd != t_rd || m_mem_en != t_mem_en)
          begin failures++; $display("FAIL test mode step %0d", i); end
      end else begin
        if (m_addr != n_addr || m_data != n_data || m_wr != n_wr || m_rd != n_rd ||
            m_mem_en != (n_wr != n_rd))
          begin failures++; $display("FAIL normal mode step %0d", i); end
      end
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
