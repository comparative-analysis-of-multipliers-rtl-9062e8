// mult_top: the multipliers under comparison, side by side.
//
// Six N x N multipliers that share only the clock and reset:
//   * shift_add_mult  - serial add-and-shift, unsigned, one bit per step,
//                       start/stop handshake;
//   * booth_seq_mult  - sequential radix-2 Booth, signed, one step per
//                       clock, start/done handshake;
//   * booth_r2_mult   - parallel radix-2 Booth, signed, N partial products;
//   * booth_r4_mult   - parallel radix-4 (modified) Booth, signed, N/2
//                       partial products;
//   * serial_3a_mult  - serial, two bits per clock through a 0/a/2a/3a
//                       multiplexer, unsigned;
//   * serial_csa_mult - serial, two bits per clock through two multiplexers
//                       and a carry-save adder, unsigned.
// The two Booth multipliers take the same signed operands and valid flag,
// so their results can be compared clock for clock; each serial unit has
// its own operands and handshake. Timing is that of each unit (see their
// headers). Bringing every unit out on its own ports is this design's
// choice: the units are alternatives to be compared, not stages of one
// datapath.
module mult_top #(
  parameter int unsigned N = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  // add-and-shift
  input  logic           sa_start,
  input  logic [N-1:0]   sa_a,
  input  logic [N-1:0]   sa_b,
  output logic           sa_stop,
  output logic [2*N-1:0] sa_product,
  // sequential radix-2 Booth
  input  logic           bs_start,
  input  logic [N-1:0]   bs_a,
  input  logic [N-1:0]   bs_b,
  output logic           bs_done,
  output logic [2*N-1:0] bs_product,
  // parallel Booth radix-2 and radix-4
  input  logic           bo_valid_in,
  input  logic [N-1:0]   bo_a,
  input  logic [N-1:0]   bo_b,
  output logic           r2_valid,
  output logic [2*N-1:0] r2_product,
  output logic           r4_valid,
  output logic [2*N-1:0] r4_product,
  // serial, 0/a/2a/3a multiplexer
  input  logic           s3_start,
  input  logic [N-1:0]   s3_a,
  input  logic [N-1:0]   s3_x,
  output logic           s3_done,
  output logic [2*N-1:0] s3_product,
  // serial, two multiplexers and a carry-save adder
  input  logic           sc_start,
  input  logic [N-1:0]   sc_a,
  input  logic [N-1:0]   sc_x,
  output logic           sc_done,
  output logic [2*N-1:0] sc_product
);
  shift_add_mult #(.N(N)) u_sa (
    .clk, .rst_n, .start(sa_start), .multiplicand(sa_a), .multiplier(sa_b),
    .stop(sa_stop), .product(sa_product)
  );

  booth_seq_mult #(.N(N)) u_bs (
    .clk, .rst_n, .start(bs_start), .multiplicand(bs_a), .multiplier(bs_b),
    .done(bs_done), .product(bs_product)
  );

  booth_r2_mult #(.N(N)) u_r2 (
    .clk, .rst_n, .valid_in(bo_valid_in), .a(bo_a), .b(bo_b),
    .valid_out(r2_valid), .product(r2_product)
  );

  booth_r4_mult #(.N(N)) u_r4 (
    .clk, .rst_n, .valid_in(bo_valid_in), .a(bo_a), .b(bo_b),
    .valid_out(r4_valid), .product(r4_product)
  );

  serial_3a_mult #(.N(N)) u_s3 (
    .clk, .rst_n, .start(s3_start), .a(s3_a), .x(s3_x),
    .done(s3_done), .product(s3_product)
  );

  serial_csa_mult #(.N(N)) u_sc (
    .clk, .rst_n, .start(sc_start), .a(sc_a), .x(sc_x),
    .done(sc_done), .product(sc_product)
  );
endmodule
