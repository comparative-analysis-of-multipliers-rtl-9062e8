// mult_pkg: types and constants shared by the multipliers.
//
// booth_sel_t is the bundle of select lines a Booth encoder hands to a
// partial-product generator: mul (the digit is non-zero), shift (the digit's
// magnitude is 2, so the multiplicand is shifted) and twocom (the digit is
// negative, so the two's complement is taken). sa_state_t holds the five
// states of the add-and-shift controller. booth_corr() gives the constant
// that undoes the inverted sign bits of the Booth partial-product rows.
package mult_pkg;

  typedef struct packed {
    logic mul;     // digit is non-zero
    logic shift;   // |digit| = 2
    logic twocom;  // digit is negative
  } booth_sel_t;

  typedef enum logic [2:0] {
    SA_IDLE  = 3'd0,
    SA_INIT  = 3'd1,
    SA_TEST  = 3'd2,
    SA_ADD   = 3'd3,
    SA_SHIFT = 3'd4
  } sa_state_t;

  // Each partial-product row is PPW bits wide, two's complement with its
  // sign bit inverted, which adds 2^(PPW-1) to its value. Row i sits STEP*i
  // places to the left. The returned constant, added once, removes all of
  // those offsets: -(2^(PPW-1)) * sum_i 2^(STEP*i), modulo 2^W.
  function automatic logic [127:0] booth_corr(int unsigned W, int unsigned PPW,
                                              int unsigned ROWS, int unsigned STEP);
    logic [127:0] acc;
    acc = '0;
    for (int unsigned i = 0; i < ROWS; i++)
      acc = acc + (128'd1 << (PPW - 1 + STEP * i));
    acc = ~acc + 128'd1;
    if (W < 128) acc = acc & ((128'd1 << W) - 128'd1);
    return acc;
  endfunction

endpackage
