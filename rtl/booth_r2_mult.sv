// booth_r2_mult: parallel radix-2 Booth multiplier, signed N x N.
//
// Each neighbouring pair of multiplier bits {b(i), b(i-1)} (b(-1) = 0) is
// recoded by a booth2_encoder into a digit in {-1, 0, +1}, and a booth_ppg
// turns it into a partial-product row (-a, 0 or +a, sign bit inverted),
// shifted i places left. The N rows and the constant that undoes the
// inverted sign bits are summed by pp_adder (unit-adder rows, a carry-save
// row and a ripple-carry adder). Sharing the radix-4 generator (with shift
// never selected) is this design's choice; it makes the rows N+2 bits
// wide, one more than -a needs.
// Timing: as booth_r4_mult, the product is registered when valid_in is
// high and appears with valid_out one clock later. N must be a power of
// two (pp_adder's tree).
module booth_r2_mult
  import mult_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           valid_in,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           valid_out,
  output logic [2*N-1:0] product
);
  localparam int unsigned ROWS = N;
  localparam int unsigned W    = 2 * N;
  localparam logic [W-1:0] K   = W'(booth_corr(W, N + 2, ROWS, 1));

  logic [N:0]   bz;
  booth_sel_t   sel  [ROWS];
  logic [N+1:0] pp   [ROWS];
  logic [W-1:0] rows [ROWS];
  logic [W-1:0] sum;

  assign bz = {b, 1'b0};

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    booth2_encoder u_be  (.pair(bz[i+1 -: 2]), .sel(sel[i]));
    booth_ppg #(.N(N)) u_ppg (.x(a), .sel(sel[i]), .pp(pp[i]));
    assign rows[i] = W'({{(W-N-2){1'b0}}, pp[i]} << i);
  end

  pp_adder #(.ROWS(ROWS), .W(W)) u_add (.rows(rows), .k(K), .sum(sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      product   <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) product <= sum;
    end
  end
endmodule
