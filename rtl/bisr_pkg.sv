// bisr_pkg: types and constants shared by the microcoded MBIST/MBISR design.
//
// The microcode word is 7 bits, one memory operation per word. Field order
// follows the word format of the design (bit #1 is the most significant bit):
//   [6] valid  1 = valid operation, 0 = end of test
//   [5] fo     first operation of a multi-operation March element
//   [4] io     in-between operation of a multi-operation element
//   [3] lo     last operation of a multi-operation element
//              (fo,io,lo = 000 marks a single-operation element)
//   [2] down   1 = address the memory in decreasing order
//   [1] wr     1 = write, 0 = read
//   [0] data   1 = all-ones byte, 0 = all-zeros byte
// The March BLC program below is built by a function from a compact table of
// its nine elements. The address order of each element is this design's own
// choice (see march_blc_dir).
package bisr_pkg;

  typedef struct packed {
    logic valid;
    logic fo;
    logic io;
    logic lo;
    logic down;
    logic wr;
    logic data;
  } microword_t;


  // Operation order of one element: up to 7 operations, each {wr, data}.
  localparam int unsigned MAX_OPS  = 7;
  localparam int unsigned N_ELEM   = 9;
  // Number of memory operations per address of March BLC (46n test).
  localparam int unsigned BLC_OPS  = 46;

  typedef enum logic [1:0] { R0 = 2'b00, R1 = 2'b01, W0 = 2'b10, W1 = 2'b11 } march_op_e;

  // March BLC element lengths ME0..ME8.
  function automatic int unsigned march_blc_len(int unsigned e);
    case (e)
      0: return 1;
      1: return 7;
      2: return 6;
      3: return 5;
      4: return 7;
      5: return 6;
      6: return 4;
      7: return 5;
      default: return 5;
    endcase
  endfunction

  // Address order of each element: ME0..ME4 ascending, ME5..ME8 descending.
  function automatic logic march_blc_dir(int unsigned e);
    return (e >= 5);
  endfunction

  // Operation k of element e of March BLC.
  function automatic march_op_e march_blc_op(int unsigned e, int unsigned k);
    march_op_e t [N_ELEM][MAX_OPS];
    t[0] = '{W0, R0, R0, R0, R0, R0, R0};
    t[1] = '{R0, R0, W0, R0, W1, W1, R1};
    t[2] = '{R1, R1, W1, R1, W0, W1, R0};
    t[3] = '{R1, R1, W0, W0, R0, R0, R0};
    t[4] = '{R0, R0, W0, R0, W1, W1, W0};
    t[5] = '{R0, R0, W0, W1, W1, R1, R0};
    t[6] = '{R1, R1, W0, W1, R0, R0, R0};
    t[7] = '{R1, R1, W0, W0, R0, R0, R0};
    t[8] = '{R0, R0, W1, W1, W0, R0, R0};
    return t[e][k];
  endfunction

  // Microcode word at program address a; past the last operation the
  // words are zero (valid = 0, end of test).
  function automatic microword_t march_blc_word(int unsigned a);
    microword_t  w;
    int unsigned n;
    march_op_e   op;
    w = '0;
    n = 0;
    for (int unsigned e = 0; e < N_ELEM; e++) begin
      for (int unsigned k = 0; k < march_blc_len(e); k++) begin
        if (n == a) begin
          op      = march_blc_op(e, k);
          w.valid = 1'b1;
          w.fo    = (march_blc_len(e) > 1) && (k == 0);
          w.io    = (k > 0) && (k < march_blc_len(e) - 1);
          w.lo    = (march_blc_len(e) > 1) && (k == march_blc_len(e) - 1);
          w.down  = march_blc_dir(e);
          w.wr    = op[1];
          w.data  = op[0];
        end
        n++;
      end
    end
    return w;
  endfunction

endpackage
