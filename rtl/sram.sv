// sram: memory under test, 2**ADDR_W words of DATA_W bits.
//
// Synchronous single-port memory. On a rising edge with mem_en and wr_en high
// and rd_en low, wdata is written at addr; with mem_en and rd_en high and
// wr_en low, the word at addr is read into rdata (one clock latency; rdata
// holds otherwise). The enable rules follow the document.
// fault_inject models the faulty memory of the document's simulation: for
// each address whose bit is set, a read returns the stored word inverted
// (the deceptive read fault seen there at address 1011). With fault_inject
// all zero the memory is fault free. Contents are not reset.
module sram #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 8
) (
  input  logic                 clk,
  input  logic                 mem_en,
  input  logic                 wr_en,
  input  logic                 rd_en,
  input  logic [ADDR_W-1:0]    addr,
  input  logic [DATA_W-1:0]    wdata,
  input  logic [2**ADDR_W-1:0] fault_inject,
  output logic [DATA_W-1:0]    rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (mem_en && wr_en && !rd_en) mem[addr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (mem_en && rd_en && !wr_en)
      rdata <= fault_inject[addr] ? ~mem[addr] : mem[addr];
  end

endmodule
