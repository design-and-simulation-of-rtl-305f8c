// mbist_controller: microcoded memory BIST controller with fault diagnosis.
//
// Connects instruction pointer, instruction storage, instruction register,
// address/data/read-write generators, the SMC sequencer and fault diagnosis
// as the architecture drawing of the design shows. The register fields feed
// the blocks directly: {fo,io,lo} the pointer, down the address generator,
// wr the read/write control, data the data generator. With start high it
// runs the stored March program once (46 operations per address for March
// BLC); each operation is fetched from storage, so any number of operations
// per March element is possible. Outputs t_* are the test collar toward the
// input multiplexer of the memory: t_mem_en is high for exactly one clock
// per memory operation, during which t_addr, t_data, t_wr and t_rd are
// stable. Read data is expected on mem_rdata one clock later. The fault
// interface (fault_pulse, fault_addr, correct_data) drives the redundancy
// array.
module mbist_controller
  import bisr_pkg::*;
#(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned IA_W   = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DATA_W-1:0] mem_rdata,
  output logic [ADDR_W-1:0] t_addr,
  output logic [DATA_W-1:0] t_data,
  output logic              t_wr,
  output logic              t_rd,
  output logic              t_mem_en,
  output logic              fault_pulse,
  output logic [ADDR_W-1:0] fault_addr,
  output logic [DATA_W-1:0] correct_data,
  output logic              done,
  output logic              fault_found
);

  logic [IA_W-1:0] inst_addr;
  microword_t      inst, ir;
  logic            inst_ena, iena, ir_ena, addr_ena, addr_load;
  logic            data_ena, rw_ena, fd_ena, over;

  inst_ptr #(.IA_W(IA_W)) u_ptr (
    .clk, .rst_n, .inst_ena,
    .inst_op ({ir.fo, ir.io, ir.lo}),
    .over, .inst_addr
  );

  inst_storage #(.IA_W(IA_W)) u_store (
    .clk, .rst_n, .iena, .inst_addr, .inst
  );

  inst_reg u_ir (
    .clk, .rst_n, .ir_ena, .inst_in(inst), .ir
  );

  addr_gen #(.ADDR_W(ADDR_W)) u_addr (
    .clk, .rst_n, .addr_ena, .addr_load, .down(ir.down), .addr(t_addr), .over
  );

  data_gen #(.DATA_W(DATA_W)) u_data (
    .clk, .rst_n, .data_ena, .data_bit(ir.data), .data(t_data)
  );

  rw_control u_rw (
    .clk, .rst_n, .rw_ena, .rw_bit(ir.wr), .wr_ena(t_wr), .rd_ena(t_rd)
  );

  smc_controller u_smc (
    .clk, .rst_n, .start,
    .valid   (ir.valid),
    .inst_op ({ir.fo, ir.io, ir.lo}),
    .rw_bit  (ir.wr),
    .over,
    .inst_ena, .iena, .ir_ena, .addr_ena, .addr_load,
    .data_ena, .rw_ena, .mem_ena(t_mem_en), .fd_ena, .done
  );

  fault_diag #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_fd (
    .clk, .rst_n, .fd_ena,
    .expected (t_data),
    .mem_out  (mem_rdata),
    .addr     (t_addr),
    .fault_pulse, .fault_addr, .correct_data, .fault_found
  );

endmodule
