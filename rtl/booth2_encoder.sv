// booth2_encoder: radix-2 Booth encoder for one partial-product row.
//
// pair = {y(i), y(i-1)}, two neighbouring multiplier bits (y(-1) = 0).
// Booth's rule: 10 -> subtract the multiplicand (digit -1), 01 -> add it
// (+1), 00 and 11 -> nothing (0). The digit is sent on the same select
// lines as the radix-4 encoder, so the same partial-product generator
// serves both: shift is always 0. Combinational.
module booth2_encoder
  import mult_pkg::*;
(
  input  logic [1:0]  pair,
  output booth_sel_t  sel
);
  always_comb begin
    sel.shift  = 1'b0;
    sel.mul    = pair[1] ^ pair[0];
    sel.twocom = pair[1] & ~pair[0];
  end
endmodule
