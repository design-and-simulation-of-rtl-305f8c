// inst_reg: 7-bit microcode instruction register.
//
// Loads the word from the instruction storage on a rising clock edge with
// ir_ena high and presents it decoded as a microword_t struct, whose fields
// (valid, fo/io/lo, down, wr, data) drive the instruction pointer, address,
// data and read/write generators and the sequencer. Active-low reset clears
// it to zero, which reads as "end of test". As in the document.
module inst_reg
  import bisr_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ir_ena,
  input  microword_t inst_in,
  output microword_t ir
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      ir <= '0;
    else if (ir_ena) ir <= inst_in;
  end

endmodule
