// sc_pkg: types and helper functions shared by the split-shift MUX-FSM
// stochastic-computing (SC) multiplier.
//
// The multiplier forms I x W by counting the 1-bits of a bit stream of
// length W whose k-th bit (k = 1, 2, ...) is input bit I[n-1-tz(k)], tz()
// being the number of trailing zeros of k (the "ruler" index sequence
// 5 4 5 3 5 4 5 2 ... for n = 6).  Input bit I[n-j] is then counted
// round(W / 2^j) times, which approximates W * I / 2^n.
//
// Contents:
//   cnt_op_e   operation issued to the shared shift counter each cycle
//   step_e     state of the master FSM (which of the three counting steps runs)
//   tz()       trailing-zero count, the rule of the conventional index FSM
//   ruler_idx  input-bit index of stream position k for an n-bit operand
package sc_pkg;

  // Operations of the shift counter (sc_shift_counter).
  typedef enum logic [2:0] {
    OP_NONE     = 3'd0,  // hold
    OP_CLEAR    = 3'd1,  // acc <= 0, cs <= 0
    OP_ADD      = 3'd2,  // acc <= acc + inc          (tail bits, rest, h == 1)
    OP_SHL      = 3'd3,  // acc <= acc << 1           (one-bit shift of the Horner scan)
    OP_CS_FIRST = 3'd4,  // cs  <= inc                (first bit of a common stream)
    OP_CS_SHIFT = 3'd5,  // cs  <= (cs << 1) + inc    (shift-and-count inside a common stream)
    OP_CS_LAST  = 3'd6   // acc <= acc + (cs << 1) + inc (last bit; common-stream count is folded in)
  } cnt_op_e;

  // Master FSM states.
  typedef enum logic [2:0] {
    ST_IDLE  = 3'd0,
    ST_STEP1 = 3'd1,  // count the common bit streams of W_H (shift-and-count)
    ST_STEP2 = 3'd2,  // count the W_H tail bits (index from the tail LUT)
    ST_STEP3 = 3'd3,  // count the W_L remaining bits (conventional index FSM)
    ST_DONE  = 3'd4   // result valid for one cycle
  } step_e;

  // Number of trailing zeros of a nonzero value; returns WIDTH for zero.
  function automatic int unsigned tz(input logic [31:0] v, input int unsigned width);
    int unsigned r;
    r = width;
    for (int b = int'(width) - 1; b >= 0; b--) begin
      if (v[b]) r = unsigned'(b);
    end
    return r;
  endfunction

  // Input-bit index selected at position k (1-based) of the index sequence
  // of an n-bit operand: n-1-tz(k).
  function automatic int unsigned ruler_idx(input logic [31:0] k, input int unsigned n);
    return n - 1 - tz(k, n);
  endfunction

endpackage
