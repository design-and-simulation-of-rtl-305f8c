// input_mux: memory input multiplexer.
//
// Purely combinational. With test_mode high (test and repair mode) the
// memory gets the BIST controller's test collar (address, data, write, read
// and MemEna); otherwise it gets the normal-mode address, data and
// read/write requests, with the memory enable high whenever a normal read or
// write is requested. As in the document; deriving the normal-mode enable
// from the requests is this design's choice.
module input_mux #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 8
) (
  input  logic              test_mode,
  input  logic [ADDR_W-1:0] t_addr,
  input  logic [DATA_W-1:0] t_data,
  input  logic              t_wr,
  input  logic              t_rd,
  input  logic              t_mem_en,
  input  logic [ADDR_W-1:0] n_addr,
  input  logic [DATA_W-1:0] n_data,
  input  logic              n_wr,
  input  logic              n_rd,
  output logic [ADDR_W-1:0] m_addr,
  output logic [DATA_W-1:0] m_data,
  output logic              m_wr,
  output logic              m_rd,
  output logic              m_mem_en
);

  always_comb begin
    if (test_mode) begin
      m_addr   = t_addr;
      m_data   = t_data;
      m_wr     = t_wr;
      m_rd     = t_rd;
      m_mem_en = t_mem_en;
    end else begin
      m_addr   = n_addr;
      m_data   = n_data;
      m_wr     = n_wr;
      m_rd     = n_rd;
      m_mem_en = n_wr ^ n_rd;
    end
  end

endmodule
