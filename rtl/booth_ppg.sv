// booth_ppg: Booth partial-product generator (5:1 multiplexer).
//
// From the N-bit two's-complement multiplicand x it forms five candidate
// rows, each N+2 bits wide with its sign bit inverted:
//   shift = -2x, two = -x, zero = 0, org = +x, mul = +2x
// and the encoder's select lines pick one: !mul -> zero; otherwise shift
// chooses between 1x and 2x and twocom between the positive and negative
// candidate. The negative candidates come from tmp = ~x + 1, formed here
// one bit wider than x so that x = -2^(N-1) is exact; that is why the rows
// are N+2 rather than N+1 bits. Inverting the sign bit adds 2^(N+1) to a
// row; the multiplier removes those offsets with one constant (see
// mult_pkg::booth_corr), so no row needs sign extension. The five
// candidates, their inverted sign bits and the 5:1 selection follow the
// source design, which makes the rows N+1 bits wide and so gets x =
// -2^(N-1) wrong; the extra bit is this design's correction. Combinational.
module booth_ppg
  import mult_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] x,
  input  booth_sel_t   sel,
  output logic [N+1:0] pp
);
  logic [N:0]   xs;    // x sign-extended to N+1 bits
  logic [N:0]   tmp;   // -x in N+1 bits
  logic [N+1:0] c_shift, c_two, c_zero, c_org, c_mul;

  always_comb begin
    xs      = {x[N-1], x};
    tmp     = ~xs + 1'b1;
    c_shift = {~tmp[N], tmp[N-1:0], 1'b0};     // -2x
    c_two   = {~tmp[N], tmp};                  // -x
    c_zero  = {1'b1, {(N+1){1'b0}}};           //  0
    c_org   = {~xs[N], xs};                    // +x
    c_mul   = {~xs[N], xs[N-1:0], 1'b0};       // +2x
    unique case ({sel.mul, sel.shift, sel.twocom})
      3'b100:  pp = c_org;
      3'b110:  pp = c_mul;
      3'b101:  pp = c_two;
      3'b111:  pp = c_shift;
      default: pp = c_zero;
    endcase
  end
endmodule
