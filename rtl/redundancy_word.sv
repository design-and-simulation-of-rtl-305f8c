// redundancy_word: one redundant word line of the repair array.
//
// Fields: FA (word programmed), faulty address, data field. A clock edge with
// program high stores faulty_addr and correct_data and sets FA. The
// comparator raises match while FA is set and addr equals the stored
// address. In normal mode (access high) a write that matches loads the data
// field from data (IE, input enable); a read that matches makes the data
// field the word's output (OE, output enable, on oe). Field layout, the
// comparator and the IE/OE enables follow the document's word-line drawing;
// active-low reset clearing FA is this design's choice.
module redundancy_word #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              program_en,
  input  logic [ADDR_W-1:0] faulty_addr,
  input  logic [DATA_W-1:0] correct_data,
  input  logic              access,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] data,
  input  logic              wr,
  input  logic              rd,
  output logic              fa,
  output logic [ADDR_W-1:0] stored_addr,
  output logic              match,
  output logic              oe,
  output logic [DATA_W-1:0] data_out
);

  logic ie;

  assign match = fa && (addr == stored_addr);
  assign ie    = access && match && wr;
  assign oe    = access && match && rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fa          <= 1'b0;
      stored_addr <= '0;
      data_out    <= '0;
    end else if (program_en) begin
      fa          <= 1'b1;
      stored_addr <= faulty_addr;
      data_out    <= correct_data;
    end else if (ie) begin
      data_out    <= data;
    end
  end

endmodule
