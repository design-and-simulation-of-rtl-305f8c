// data_gen: test data generator.
//
// On a rising edge with data_ena high the output register takes a byte of all
// ones when data_bit (microword bit 0) is 1, else all zeros. The same value is
// written to the memory or used as the expected read data. Active-low reset
// clears it. As in the document.
module data_gen #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              data_ena,
  input  logic              data_bit,
  output logic [DATA_W-1:0] data
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        data <= '0;
    else if (data_ena) data <= {DATA_W{data_bit}};
  end

endmodule
