// output_mux: output multiplexer of the repaired memory.
//
// Combinational: data_out is the redundant word's data when sel_red (a
// registered redundancy hit) is high, else the memory's read data. As in
// the document.
module output_mux #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              sel_red,
  input  logic [DATA_W-1:0] mem_data,
  input  logic [DATA_W-1:0] red_data,
  output logic [DATA_W-1:0] data_out
);

  assign data_out = sel_red ? red_data : mem_data;

endmodule
