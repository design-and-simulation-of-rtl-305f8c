// inst_ptr: microcode instruction pointer.
//
// Holds InstAddr, the address of the microword to fetch next. On a clock edge
// with inst_ena high it moves according to the element-position bits of the
// word that has just executed (inst_op = {fo, io, lo}) and the address
// generator's "over" flag (current memory address is the last one of the
// element's address order):
//   fo            remember this word as the element's start, go to the next word
//   io            go to the next word
//   lo            over ? next word : back to the remembered start word
//   single (000)  over ? next word : stay on this word
// This lets an element of any number of operations run on every address,
// one operation per word. The loop-back rule is this design's reading of how
// the pointer uses the Fo/Io/Lo bits; the document gives the pointer's inputs
// (the InstOp[5:3] feedback and the over signal) and its active-low reset to
// zero. Timing: one update per enabled clock edge, no combinational path
// from inputs to inst_addr.
module inst_ptr #(
  parameter int unsigned IA_W = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            inst_ena,
  input  logic [2:0]      inst_op,   // {fo, io, lo}
  input  logic            over,
  output logic [IA_W-1:0] inst_addr
);

  logic [IA_W-1:0] start_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inst_addr <= '0;
      start_q   <= '0;
    end else if (inst_ena) begin
      unique case (inst_op)
        3'b100: begin
          start_q   <= inst_addr;
          inst_addr <= inst_addr + 1'b1;
        end
        3'b010: inst_addr <= inst_addr + 1'b1;
        3'b001: inst_addr <= over ? inst_addr + 1'b1 : start_q;
        3'b000: inst_addr <= over ? inst_addr + 1'b1 : inst_addr;
        default: inst_addr <= inst_addr + 1'b1;   // illegal code: skip the word
      endcase
    end
  end

endmodule
