// serial_csa_mult: serial multiplier retiring two multiplier bits per clock
// without a 3a multiple. Unsigned N x N, N even.
//
// Each clock one multiplexer picks 0 or 2a by x(j+1) and another 0 or a by
// x(j); a carry-save adder (csa) reduces those two and the old cumulative
// partial product H to two vectors, and a ripple-carry adder (rca) turns
// them into the new cumulative partial product. {new H, X} then shifts
// right two places. After N/2 clocks the product is {H, X}.
// Interface and timing: start is taken while done is high; the operands
// are loaded in that clock, N/2 step clocks follow, and done rises after
// them (latency N/2 clocks from the clock that takes start). The
// handshake and the reset are this design's choices.
module serial_csa_mult #(
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

  logic [N-1:0]  a_q, h_q, x_q;
  logic [N+1:0]  m2a, m1a, cs_s, cs_c, sum;
  logic [CW-1:0] steps;
  logic          busy, c_unused;

  assign m2a = x_q[1] ? {1'b0, a_q, 1'b0} : '0;
  assign m1a = x_q[0] ? {2'b00, a_q}      : '0;

  csa #(.W(N + 2)) u_csa (
    .x({2'b00, h_q}), .y(m2a), .z(m1a), .s(cs_s), .c(cs_c)
  );
  rca #(.W(N + 2)) u_add (
    .a(cs_s), .b(cs_c), .cin(1'b0), .sum(sum), .cout(c_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; h_q <= '0; x_q <= '0; steps <= '0; busy <= 1'b0;
    end else if (busy) begin
      {h_q, x_q} <= {sum, x_q[N-1:2]};
      steps      <= steps + 1'b1;
      if (steps + 1'b1 == CW'(N / 2)) busy <= 1'b0;
    end else if (start) begin
      a_q   <= a;
      x_q   <= x;
      h_q   <= '0;
      steps <= '0;
      busy  <= 1'b1;
    end
  end

  assign done    = ~busy;
  assign product = {h_q, x_q};
endmodule
