// ua_row: W-bit row of unit adders, reducing four numbers to two.
//
// a + b + c + d = s + cy (mod 2^W), computed as (a+b)+(c+d) in two
// full-adder delays instead of three for ((a+b)+c)+d. Column i's carry
// out c0 feeds column i+1's carry in c1; column 0 gets 0. The carry vector
// cy is returned shifted one place left; anything above bit W-1 is
// dropped. Combinational.
module ua_row #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] s,
  output logic [W-1:0] cy
);
  logic [W:0]   chain;  // c0 of column i-1 -> c1 of column i
  logic [W-1:0] cc;
  assign chain[0] = 1'b0;
  for (genvar i = 0; i < W; i++) begin : g_col
    unit_adder u_ua (
      .x ({d[i], c[i], b[i], a[i]}),
      .c1(chain[i]),
      .s (s[i]),
      .c (cc[i]),
      .c0(chain[i+1])
    );
  end
  assign cy = {cc[W-2:0], 1'b0};
  logic [1:0] unused_msb_carries;
  assign unused_msb_carries = {chain[W], cc[W-1]};  // weight 2^W: outside the modulus
endmodule
