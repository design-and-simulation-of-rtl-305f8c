// redundancy_array: word-redundancy repair array with overflow detection.
//
// N_RED redundant words (redundancy_word) sit beside the memory.
// Test and repair mode (test_mode high): each fault_pulse programs the next
// free word with fault_addr and correct_data and advances the fill count
// used; a fault pulse when all words are in use sets the sticky overflow
// flag (memory not repairable). A fault pulse for an address that a word
// already holds is ignored, since a March test reads a faulty word many
// times; that check is this design's choice.
// Normal mode: every memory access is compared with the stored addresses.
// A matching write also loads the word's data field; a matching read
// registers hit_q = 1 and the word's data on rdata_q at the same clock edge
// at which the memory registers its own read data, so the output multiplexer
// can pick rdata_q. A read without a match, and any read in test mode,
// clears hit_q. The fill-and-overflow order follows the document's flowchart.
module redundancy_array #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned N_RED  = 4,
  localparam int unsigned CNT_W = $clog2(N_RED + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              test_mode,
  input  logic              fault_pulse,
  input  logic [ADDR_W-1:0] fault_addr,
  input  logic [DATA_W-1:0] correct_data,
  input  logic              mem_en,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              wr,
  input  logic              rd,
  output logic              hit_q,
  output logic [DATA_W-1:0] rdata_q,
  output logic              overflow,
  output logic [CNT_W-1:0]  used
);

  logic [N_RED-1:0]  fa, oe, prog, dup;
  logic [ADDR_W-1:0] stored [N_RED];
  logic [DATA_W-1:0] wdata_out [N_RED];
  logic              access, any_dup, full, take;
  logic [DATA_W-1:0] hit_data;

  assign access  = !test_mode && mem_en;
  assign any_dup = |dup;
  assign full    = (used == CNT_W'(N_RED));
  assign take    = test_mode && fault_pulse && !any_dup;

  for (genvar i = 0; i < N_RED; i++) begin : g_word
    assign dup[i]  = fa[i] && (stored[i] == fault_addr);
    assign prog[i] = take && (used == CNT_W'(i));
    redundancy_word #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_word (
      .clk, .rst_n,
      .program_en  (prog[i]),
      .faulty_addr (fault_addr),
      .correct_data(correct_data),
      .access, .addr, .data(wdata), .wr, .rd,
      .fa          (fa[i]),
      .stored_addr (stored[i]),
      .match       (),
      .oe          (oe[i]),
      .data_out    (wdata_out[i])
    );
  end

  // Output selection among the words: the lowest-numbered enabled word.
  always_comb begin
    hit_data = '0;
    for (int i = N_RED - 1; i >= 0; i--)
      if (oe[i]) hit_data = wdata_out[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used     <= '0;
      overflow <= 1'b0;
      hit_q    <= 1'b0;
      rdata_q  <= '0;
    end else begin
      if (take) begin
        if (full) overflow <= 1'b1;
        else      used     <= used + 1'b1;
      end
      if (mem_en && rd && !wr) begin
        hit_q   <= access && (|oe);
        rdata_q <= hit_data;
      end
    end
  end

endmodule
