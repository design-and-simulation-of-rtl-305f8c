// bisr_top: embedded memory with microcoded built-in self-test and repair.
//
// Blocks: the MBIST controller (microcode March test plus fault diagnosis),
// the input multiplexer, the memory under test, the redundancy array and
// the output multiplexer, connected as in the design's block diagram.
// Mode 1, test and repair (test_mode = 1): after start the controller runs
// March BLC over every address through the input multiplexer; each detected
// fault programs a redundant word with the faulty address and the correct
// data; test_done rises at the end, fault_found if any read mismatched, and
// not_repairable if the faults needed more than N_RED words.
// Mode 2, normal (test_mode = 0): wr_in / rd_in access the memory at addr_in;
// an address held by a redundant word is written to both and read from the
// redundant word. Reads have one clock latency: data_out is valid the clock
// after rd_in. fault_inject marks memory words that read back inverted, to
// simulate a faulty memory. Widths follow the document (4-bit address, 8-bit
// data); the number of redundant words and the program-store depth are this
// design's choice.
module bisr_top #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned IA_W   = 6,
  parameter int unsigned N_RED  = 4,
  localparam int unsigned CNT_W = $clog2(N_RED + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 test_mode,
  input  logic                 start,
  input  logic [2**ADDR_W-1:0] fault_inject,
  input  logic [ADDR_W-1:0]    addr_in,
  input  logic [DATA_W-1:0]    data_in,
  input  logic                 wr_in,
  input  logic                 rd_in,
  output logic [DATA_W-1:0]    data_out,
  output logic                 test_done,
  output logic                 fault_found,
  output logic                 not_repairable,
  output logic [CNT_W-1:0]     red_used
);

  logic [ADDR_W-1:0] t_addr, m_addr, fault_addr;
  logic [DATA_W-1:0] t_data, m_data, correct_data, mem_rdata, red_rdata;
  logic              t_wr, t_rd, t_mem_en, m_wr, m_rd, m_mem_en;
  logic              fault_pulse, red_hit;

  mbist_controller #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .IA_W(IA_W)) u_mbist (
    .clk, .rst_n,
    .start     (start && test_mode),
    .mem_rdata,
    .t_addr, .t_data, .t_wr, .t_rd, .t_mem_en,
    .fault_pulse, .fault_addr, .correct_data,
    .done      (test_done),
    .fault_found
  );

  input_mux #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_imux (
    .test_mode,
    .t_addr, .t_data, .t_wr, .t_rd, .t_mem_en,
    .n_addr(addr_in), .n_data(data_in), .n_wr(wr_in), .n_rd(rd_in),
    .m_addr, .m_data, .m_wr, .m_rd, .m_mem_en
  );

  sram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_mem (
    .clk,
    .mem_en(m_mem_en), .wr_en(m_wr), .rd_en(m_rd),
    .addr(m_addr), .wdata(m_data), .fault_inject,
    .rdata(mem_rdata)
  );

  redundancy_array #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .N_RED(N_RED)) u_rla (
    .clk, .rst_n, .test_mode,
    .fault_pulse, .fault_addr, .correct_data,
    .mem_en(m_mem_en), .addr(m_addr), .wdata(m_data), .wr(m_wr), .rd(m_rd),
    .hit_q(red_hit), .rdata_q(red_rdata),
    .overflow(not_repairable), .used(red_used)
  );

  output_mux #(.DATA_W(DATA_W)) u_omux (
    .sel_red(red_hit), .mem_data(mem_rdata), .red_data(red_rdata), .data_out
  );

endmodule
