// rw_control: memory read/write enable generator.
//
// On a rising edge with rw_ena high it sets wr_ena to the microword's R/W bit
// (1 = write) and rd_ena to its inverse, so exactly one is high; both hold
// until the next load. Active-low reset clears both. The memory acts only
// while the sequencer's MemEna is high. As in the document.
module rw_control (
  input  logic clk,
  input  logic rst_n,
  input  logic rw_ena,
  input  logic rw_bit,
  output logic wr_ena,
  output logic rd_ena
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ena <= 1'b0;
      rd_ena <= 1'b0;
    end else if (rw_ena) begin
      wr_ena <= rw_bit;
      rd_ena <= !rw_bit;
    end
  end

  // Exactly one of the two enables is high once loaded.
  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(wr_ena && rd_ena));

endmodule
