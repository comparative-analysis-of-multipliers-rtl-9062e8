// rca: W-bit ripple-carry adder.
//
// A chain of W full adders; the carry enters at bit 0 and leaves at bit
// W-1. It serves as the n-bit adder of the add-and-shift multiplier and as
// the final carry-propagate adder after the carry-save reduction of the
// Booth multipliers. The adder type is this design's choice: the simplest
// adder, as the slower counterpart of faster carry schemes.
// Combinational; delay grows linearly with W.
module rca #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(sum[i]), .co(c[i+1]));
  end
  assign cout = c[W];
endmodule
