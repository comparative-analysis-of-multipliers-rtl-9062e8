// booth_r4_mult: parallel radix-4 (modified) Booth multiplier, signed N x N.
//
// The multiplier b, with a 0 appended below its LSB, is cut into N/2
// overlapping three-bit groups; a booth4_encoder per group yields a digit
// in {-2..+2}, and a booth_ppg per group turns it into a partial-product
// row (-2a, -a, 0, +a or +2a, sign bit inverted). Row i is shifted 2i
// places left. The N/2 rows and a constant that undoes the inverted sign
// bits are summed by pp_adder (unit-adder rows, a carry-save row and a
// ripple-carry adder). Halving the number of rows against radix 2 is the
// point of the design.
// Timing: combinational from a, b to the adder output; the product is
// captured in a result register when valid_in is high, so valid_out and
// product follow one clock later (throughput one product per cycle).
// The result register and the valid flag are this design's choice for the
// accumulator stage of the architecture. N must be even and N/2 a power
// of two (pp_adder's tree).
module booth_r4_mult
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
  localparam int unsigned ROWS = N / 2;
  localparam int unsigned W    = 2 * N;
  localparam logic [W-1:0] K   = W'(booth_corr(W, N + 2, ROWS, 2));

  logic [N:0]   bz;                 // b with y(-1) = 0 appended
  booth_sel_t   sel  [ROWS];
  logic [N+1:0] pp   [ROWS];
  logic [W-1:0] rows [ROWS];
  logic [W-1:0] sum;

  assign bz = {b, 1'b0};

  for (genvar i = 0; i < ROWS; i++) begin : g_row
    booth4_encoder u_be  (.grp(bz[2*i+2 -: 3]), .sel(sel[i]));
    booth_ppg #(.N(N)) u_ppg (.x(a), .sel(sel[i]), .pp(pp[i]));
    assign rows[i] = W'({{(W-N-2){1'b0}}, pp[i]} << (2 * i));
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
