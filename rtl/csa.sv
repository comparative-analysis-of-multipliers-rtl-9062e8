// csa: W-bit carry-save adder.
//
// A row of W independent full adders reduces three numbers x, y, z to two,
// a sum vector s and a carry vector c, with x + y + z = s + c (mod 2^W).
// No carry moves sideways, so the delay is one full adder whatever W is.
// The carry vector is returned already shifted one place left; the carry
// out of bit W-1 is dropped (arithmetic is modulo 2^W). Combinational.
module csa #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] co;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(x[i]), .b(y[i]), .ci(z[i]), .s(s[i]), .co(co[i]));
  end
  assign c = {co[W-2:0], 1'b0};
  logic unused_msb_carry;
  assign unused_msb_carry = co[W-1];  // weight 2^W: outside the modulus
endmodule
