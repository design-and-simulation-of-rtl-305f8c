// inst_storage: microcode store holding the March test program.
//
// A 2**IA_W x 7-bit table initialised with the March BLC program (46
// operations followed by end-of-test words, see bisr_pkg). With iena high the
// word at inst_addr is read on the rising clock edge into the output register
// inst (one cycle read latency). The document stores the program here so that
// another March test needs only new contents; the contents are computed by a
// package function rather than loaded from a file. Reset clears the output
// register only.
module inst_storage
  import bisr_pkg::*;
#(
  parameter int unsigned IA_W = 6
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            iena,
  input  logic [IA_W-1:0] inst_addr,
  output microword_t      inst
);

  localparam int unsigned DEPTH = 2 ** IA_W;

  function automatic microword_t rom_word(int unsigned a);
    return march_blc_word(a);
  endfunction

  microword_t rom [DEPTH];

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++) rom[a] = rom_word(a);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    inst <= '0;
    else if (iena) inst <= rom[inst_addr];
  end

endmodule
