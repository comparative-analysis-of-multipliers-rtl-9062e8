// unit_adder: one column of a carry-save adder built from unit adders.
//
// Takes four data bits x[3:0] (X3..X0) of equal weight and a carry c1 from
// the next lower column, and returns a sum bit s (weight 1) and two bits of
// weight 2: c, and c0, which goes to the next higher column. It is a 4:2
// compressor: x0+x1+x2+x3+c1 = s + 2*(c + c0).
// Inside, a first full adder adds x0, x1, x2 and gives c0; a second adds
// its sum, x3 and c1. c0 does not depend on c1, so along a row of unit
// adders the carry moves only one column and never ripples. The ports follow
// the source design's unit adder; the two-full-adder inside is this
// design's choice. Combinational, two full-adder delays.
module unit_adder (
  input  logic [3:0] x,
  input  logic       c1,
  output logic       s,
  output logic       c,
  output logic       c0
);
  logic s1;
  full_adder u_fa1 (.a(x[0]), .b(x[1]), .ci(x[2]), .s(s1), .co(c0));
  full_adder u_fa2 (.a(s1),   .b(x[3]), .ci(c1),   .s(s),  .co(c));
endmodule
