// booth_pkg: types shared by the multipliers.
//
// booth_sel_t is the one-hot-ish select bundle produced by the radix-4 Booth
// encoder for one multiplier digit d in {-2,-1,0,+1,+2}: 'one' selects |d| = 1,
// 'two' selects |d| = 2, neither selects 0, and 'neg' marks a negative digit.
// seq_state_t is the state of the two sequential (one bit per clock)
// multipliers. The encodings are this design's own choice.
package booth_pkg;

  typedef struct packed {
    logic neg;   // digit is negative: row is complemented, +1 added as a correction bit
    logic one;   // |digit| == 1: row is the multiplicand
    logic two;   // |digit| == 2: row is the multiplicand shifted left once
  } booth_sel_t;

  typedef enum logic [1:0] {
    SEQ_IDLE = 2'd0,  // waiting for start
    SEQ_RUN  = 2'd1,  // one add/shift step per clock
    SEQ_DONE = 2'd2   // product held, done pulsed
  } seq_state_t;

  // Number of radix-4 digits needed for a WIDTH-bit operand that may be
  // unsigned: WIDTH+1 bits (zero or sign extended) rounded up to even.
  function automatic int unsigned r4_digits(input int unsigned width);
    return (width + 2) / 2;
  endfunction

endpackage
