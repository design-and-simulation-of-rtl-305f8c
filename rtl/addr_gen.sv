// addr_gen: test address generator.
//
// On a rising edge with addr_load high the address is set to the first
// address of an element in the order given by down (0 going up, the top
// address going down); with addr_ena high it steps by one, down or up.
// "over" is high, combinationally, while the address is the last one of the
// current order; the instruction pointer and the sequencer use it to end an
// element. Active-low reset to zero and the enabled up/down step follow the
// document; the load input and the over flag are this design's additions
// that let one counter serve elements of both orders.
module addr_gen #(
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              addr_ena,
  input  logic              addr_load,
  input  logic              down,
  output logic [ADDR_W-1:0] addr,
  output logic              over
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         addr <= '0;
    else if (addr_load) addr <= down ? '1 : '0;
    else if (addr_ena)  addr <= down ? addr - 1'b1 : addr + 1'b1;
  end

  assign over = down ? (addr == '0) : (addr == '1);

endmodule
