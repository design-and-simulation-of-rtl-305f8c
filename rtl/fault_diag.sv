// fault_diag: fault diagnosis by comparing read data with expected data.
//
// In a cycle with fd_ena high it compares mem_out (the memory's read data)
// with expected (the data generator's byte). On a mismatch it raises
// fault_pulse for the next clock and registers the address read and the
// expected (correct) data on fault_addr and correct_data, which hold until
// the next fault. fault_found stays high from the first fault until reset.
// These three signals are the interface the repair array takes from the
// BIST logic, as in the document; registering them is this design's choice.
module fault_diag #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fd_ena,
  input  logic [DATA_W-1:0] expected,
  input  logic [DATA_W-1:0] mem_out,
  input  logic [ADDR_W-1:0] addr,
  output logic              fault_pulse,
  output logic [ADDR_W-1:0] fault_addr,
  output logic [DATA_W-1:0] correct_data,
  output logic              fault_found
);

  logic mismatch;
  assign mismatch = fd_ena && (mem_out != expected);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fault_pulse  <= 1'b0;
      fault_addr   <= '0;
      correct_data <= '0;
      fault_found  <= 1'b0;
    end else begin
      fault_pulse <= mismatch;
      if (mismatch) begin
        fault_addr   <= addr;
        correct_data <= expected;
        fault_found  <= 1'b1;
      end
    end
  end

endmodule
