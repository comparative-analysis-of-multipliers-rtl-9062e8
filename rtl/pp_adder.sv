// pp_adder: adds ROWS aligned partial-product rows and one constant row.
//
// The rows are reduced in levels of unit-adder rows (ua_row), each turning
// four numbers into two, so ROWS rows become two after log2(ROWS)-1 levels;
// the rows are paired as in (A+B)+(C+D). A carry-save row (csa) then folds
// in the constant k, and a ripple-carry adder (rca) gives the final sum.
// Everything is modulo 2^W. ROWS must be a power of two, at least 2.
// The order of the levels is this design's choice. Combinational.
module pp_adder #(
  parameter int unsigned ROWS = 4,
  parameter int unsigned W    = 16
) (
  input  logic [W-1:0] rows [ROWS],
  input  logic [W-1:0] k,
  output logic [W-1:0] sum
);
  localparam int unsigned LV = $clog2(ROWS) - 1;  // unit-adder levels

  initial begin
    assert (ROWS >= 2 && (1 << $clog2(ROWS)) == ROWS)
      else $error("pp_adder: ROWS must be a power of two >= 2");
  end

  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    localparam int unsigned CNT = ROWS >> l;
    logic [W-1:0] v [CNT];
    if (l == 0) begin : g_in
      assign v = rows;
    end else begin : g_red
      for (genvar j = 0; j < CNT / 2; j++) begin : g_row
        ua_row #(.W(W)) u_ua (
          .a (g_lvl[l-1].v[4*j]),
          .b (g_lvl[l-1].v[4*j+1]),
          .c (g_lvl[l-1].v[4*j+2]),
          .d (g_lvl[l-1].v[4*j+3]),
          .s (v[2*j]),
          .cy(v[2*j+1])
        );
      end
    end
  end

  logic [W-1:0] cs_s, cs_c;
  logic         unused_cout;
  csa #(.W(W)) u_csa (
    .x(g_lvl[LV].v[0]), .y(g_lvl[LV].v[1]), .z(k), .s(cs_s), .c(cs_c)
  );
  rca #(.W(W)) u_cpa (
    .a(cs_s), .b(cs_c), .cin(1'b0), .sum(sum), .cout(unused_cout)
  );
endmodule
