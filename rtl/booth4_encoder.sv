// booth4_encoder: radix-4 (modified) Booth encoder for one partial-product row.
//
// grp = {y(2i+1), y(2i), y(2i-1)} is an overlapping group of three
// multiplier bits (y(-1) = 0). Its Booth digit d = -2*y(2i+1) + y(2i) +
// y(2i-1) lies in {-2, -1, 0, +1, +2} and is sent out as three select
// lines: mul (d != 0), shift (|d| = 2) and twocom (d < 0). A digit 0 never
// sets twocom. The three line names follow the source design; what each
// line means is this design's choice. Combinational.
module booth4_encoder
  import mult_pkg::*;
(
  input  logic [2:0]  grp,
  output booth_sel_t  sel
);
  always_comb begin
    unique case (grp)
      3'b000, 3'b111: sel = '{mul: 1'b0, shift: 1'b0, twocom: 1'b0};  //  0
      3'b001, 3'b010: sel = '{mul: 1'b1, shift: 1'b0, twocom: 1'b0};  // +1
      3'b011:         sel = '{mul: 1'b1, shift: 1'b1, twocom: 1'b0};  // +2
      3'b100:         sel = '{mul: 1'b1, shift: 1'b1, twocom: 1'b1};  // -2
      3'b101, 3'b110: sel = '{mul: 1'b1, shift: 1'b0, twocom: 1'b1};  // -1
      default:        sel = '{mul: 1'b0, shift: 1'b0, twocom: 1'b0};
    endcase
  end
endmodule
