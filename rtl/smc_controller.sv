// smc_controller: sequencing state machine of the MBIST controller.
//
// Runs the microcode one operation at a time. Each operation takes these
// states, one clock each:
//   FETCH   IEna: the instruction storage reads the word at InstAddr
//   LOAD    IREna: the instruction register takes the word
//   DECODE  end of test if the word is not valid; else DataEna and RWEna
//           load the data and read/write generators, and at the start of a
//           new element AddrEna/load sets the first address of its order
//   EXEC    MemEna: the memory performs the read or write
//   CMP     (reads only) FDEna: fault diagnosis compares the read data
//   NEXT    InstEna: the pointer moves; AddrEna steps the address after the
//           last (or only) operation of an element unless "over" is set
// so a write costs 5 clocks and a read 6 clocks per address. After an
// end-of-test word it stays in DONE with done high until start is low,
// then returns to IDLE; a new run needs a reset to bring the pointer back
// to word 0. The document names this block (SMC) and its enable outputs
// only; the state sequence is this design's own.
module smc_controller (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       valid,
  input  logic [2:0] inst_op,   // {fo, io, lo} of the word in the instruction register
  input  logic       rw_bit,    // 1 = write
  input  logic       over,
  output logic       inst_ena,
  output logic       iena,
  output logic       ir_ena,
  output logic       addr_ena,
  output logic       addr_load,
  output logic       data_ena,
  output logic       rw_ena,
  output logic       mem_ena,
  output logic       fd_ena,
  output logic       done
);

  typedef enum logic [2:0] {
    S_IDLE, S_FETCH, S_LOAD, S_DECODE, S_EXEC, S_CMP, S_NEXT, S_DONE
  } state_e;

  state_e state_q, state_d;
  logic   new_elem_q;
  logic   elem_end;   // word is the last or only operation of its element

  assign elem_end = inst_op[0] || (inst_op == 3'b000);

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_IDLE:   if (start) state_d = S_FETCH;
      S_FETCH:  state_d = S_LOAD;
      S_LOAD:   state_d = S_DECODE;
      S_DECODE: state_d = valid ? S_EXEC : S_DONE;
      S_EXEC:   state_d = rw_bit ? S_NEXT : S_CMP;
      S_CMP:    state_d = S_NEXT;
      S_NEXT:   state_d = S_FETCH;
      S_DONE:   if (!start) state_d = S_IDLE;
      default:  state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      new_elem_q <= 1'b1;
    end else begin
      state_q <= state_d;
      if (state_q == S_DECODE && valid) new_elem_q <= 1'b0;
      else if (state_q == S_NEXT && elem_end && over) new_elem_q <= 1'b1;
    end
  end

  assign iena      = (state_q == S_FETCH);
  assign ir_ena    = (state_q == S_LOAD);
  assign data_ena  = (state_q == S_DECODE) && valid;
  assign rw_ena    = (state_q == S_DECODE) && valid;
  assign addr_load = (state_q == S_DECODE) && valid && new_elem_q;
  assign mem_ena   = (state_q == S_EXEC);
  assign fd_ena    = (state_q == S_CMP);
  assign inst_ena  = (state_q == S_NEXT);
  assign addr_ena  = (state_q == S_NEXT) && elem_end && !over;
  assign done      = (state_q == S_DONE);

  // A memory operation lasts one clock and is never issued together with a
  // compare, a fetch or a pointer move.
  a_mem_one_clock: assert property (@(posedge clk) disable iff (!rst_n) mem_ena |=> !mem_ena);
  a_mem_alone: assert property (@(posedge clk) disable iff (!rst_n)
                                mem_ena |-> !(fd_ena || iena || inst_ena));

endmodule
