// mbist_pkg: types and constants shared by the microcoded memory BIST/BISR design.
//
// The BIST controller executes March tests written as a list of 7-bit microwords, one
// memory operation per word. Field order follows the original microword definition, bit #1 first
// (most significant): Valid, FO (first operation of a multi-operation element), IO
// (in-between operation), LO (last operation), I/D (1 = descending addresses), R/W
// (1 = write), Data (1 = all-ones pattern). FO = IO = LO = 0 marks a single-operation
// element. A word with Valid = 0 ends the test.
//
// march_ss_word() returns the March-SS program of the original architecture (22 words, M0..M5):
//   M0: up/any (w0)   M1: up (r0,r0,w0,r0,w1)   M2: up (r1,r1,w1,r1,w0)
//   M3: down (r0,r0,w0,r0,w1)   M4: down (r1,r1,w1,r1,w0)   M5: any (r0)
// Index 22 and beyond return an all-zero (end of test) word.
package mbist_pkg;

  typedef struct packed {
    logic valid;  // #1
    logic fo;     // #2 first operation of a multi-operation element
    logic io;     // #3 in-between operation
    logic lo;     // #4 last operation
    logic dec;    // #5 1 = descending address order
    logic wr;     // #6 1 = write, 0 = read
    logic data;   // #7 1 = all-ones data, 0 = all-zeros
  } microword_t;

  typedef enum logic [1:0] {
    ELEM_SINGLE = 2'd0,
    ELEM_FIRST  = 2'd1,
    ELEM_MIDDLE = 2'd2,
    ELEM_LAST   = 2'd3
  } elem_pos_e;

  // Number of valid words of the March-SS program.
  localparam int unsigned MARCH_SS_LEN = 22;

  // Build one word from its fields.
  function automatic microword_t mw(logic fo, logic io, logic lo, logic dec, logic wr,
                                    logic data);
    microword_t w;
    w.valid = 1'b1;
    w.fo    = fo;
    w.io    = io;
    w.lo    = lo;
    w.dec   = dec;
    w.wr    = wr;
    w.data  = data;
    return w;
  endfunction

  // One five-operation element: r(d) r(d) w(d) r(d) w(~d), direction dec.
  function automatic microword_t ss_elem(int unsigned k, logic dec, logic d);
    microword_t w;
    case (k)
      0:       w = mw(1'b1, 1'b0, 1'b0, dec, 1'b0, d);
      1:       w = mw(1'b0, 1'b1, 1'b0, dec, 1'b0, d);
      2:       w = mw(1'b0, 1'b1, 1'b0, dec, 1'b1, d);
      3:       w = mw(1'b0, 1'b1, 1'b0, dec, 1'b0, d);
      default: w = mw(1'b0, 1'b0, 1'b1, dec, 1'b1, ~d);
    endcase
    return w;
  endfunction

  function automatic microword_t march_ss_word(int unsigned idx);
    microword_t w;
    if (idx == 0)        w = mw(1'b0, 1'b0, 1'b0, 1'b0, 1'b1, 1'b0);   // M0 w0
    else if (idx <= 5)   w = ss_elem(idx - 1,  1'b0, 1'b0);             // M1
    else if (idx <= 10)  w = ss_elem(idx - 6,  1'b0, 1'b1);             // M2
    else if (idx <= 15)  w = ss_elem(idx - 11, 1'b1, 1'b0);             // M3
    else if (idx <= 20)  w = ss_elem(idx - 16, 1'b1, 1'b1);             // M4
    else if (idx == 21)  w = mw(1'b0, 1'b0, 1'b0, 1'b1, 1'b0, 1'b0);   // M5 r0
    else                 w = '0;                                        // end of test
    return w;
  endfunction

  function automatic elem_pos_e elem_pos(microword_t w);
    if (w.fo)      return ELEM_FIRST;
    else if (w.io) return ELEM_MIDDLE;
    else if (w.lo) return ELEM_LAST;
    else           return ELEM_SINGLE;
  endfunction

endpackage
