// serial_3a_mult: serial multiplier retiring two multiplier bits per clock,
// with a precomputed 3a. Unsigned N x N, N even.
//
// On start the multiplicand a, the multiple 3a (= a + 2a, formed by an
// adder in the load cycle) and the multiplier x are loaded and the upper
// product half H is cleared. In each of the next N/2 clocks the two
// lowest multiplier bits {x(j+1), x(j)} drive a 4:1 multiplexer over
// 0, a, 2a and 3a; the choice is added to H and the pair {H + choice, X}
// shifts right two places, so X's low end collects the product's low
// bits. After N/2 clocks the product is {H, X} and done rises.
// Interface: start is taken while done is high; product holds until the
// next start. Latency 1 + N/2 clocks from the clock that takes start to
// done rising. The start/done handshake, the reset and forming 3a during
// the load are this design's choices.
module serial_3a_mult #(
  parameter int unsigned N = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   x,
  output logic           done,
  output logic [2*N-1:0] product
);
  localparam int unsigned CW = $clog2(N / 2 + 1);

  logic [N+1:0]  a_q, a3_q;      // a and 3a, N+2 bits
  logic [N-1:0]  h_q, x_q;
  logic [N+1:0]  choice, sum, add_b;
  logic [CW-1:0] steps;
  logic          busy, loading, c_unused;

  // One adder: 3a = a + 2a while loading, H + choice while stepping.
  always_comb begin
    unique case (x_q[1:0])
      2'b00: choice = '0;
      2'b01: choice = a_q;
      2'b10: choice = {a_q[N:0], 1'b0};
      2'b11: choice = a3_q;
    endcase
    add_b = loading ? {a_q[N:0], 1'b0} : choice;
  end
  rca #(.W(N + 2)) u_add (
    .a  (loading ? a_q : {2'b00, h_q}),
    .b  (add_b), .cin(1'b0), .sum(sum), .cout(c_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; a3_q <= '0; h_q <= '0; x_q <= '0;
      steps <= '0; busy <= 1'b0; loading <= 1'b0;
    end else if (loading) begin
      a3_q    <= sum;
      loading <= 1'b0;
      busy    <= 1'b1;
      steps   <= '0;
    end else if (busy) begin
      {h_q, x_q} <= {sum, x_q[N-1:2]};
      steps      <= steps + 1'b1;
      if (steps + 1'b1 == CW'(N / 2)) busy <= 1'b0;
    end else if (start) begin
      a_q     <= {2'b00, a};
      x_q     <= x;
      h_q     <= '0;
      loading <= 1'b1;
    end
  end

  assign done    = ~busy & ~loading;
  assign product = {h_q, x_q};
endmodule
