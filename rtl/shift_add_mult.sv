// shift_add_mult: serial add-and-shift multiplier, unsigned N x N.
//
// Registers: M holds the multiplicand, Q the multiplier, A the upper half
// of the product and C the carry out of the N-bit adder. On start the
// controller (shift_add_ctrl) loads M and Q and clears C and A. Then, N
// times: if Q[0] is 1, {C, A} = A + M; then {C, A, Q} shifts right one
// place. After N shifts the product is {A, Q} and stop goes high again.
// The adder is an N-bit ripple-carry adder (rca).
// Interface: start is taken while stop is high; the operands are loaded
// in the next clock (the controller's INIT state), so they must be held
// for one clock after start. product is valid while stop is high after a
// run and holds until the next start. Latency 1 + 2N + (ones in the
// multiplier) clocks from the clock that takes start to stop rising.
// Unsigned operands are this design's choice.
module shift_add_mult #(
  parameter int unsigned N = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   multiplicand,
  input  logic [N-1:0]   multiplier,
  output logic           stop,
  output logic [2*N-1:0] product
);
  logic         load, add, shift;
  logic [N-1:0] m_q, a_q, q_q, sum;
  logic         c_q, cout;

  shift_add_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n, .start, .lsb(q_q[0]),
    .load, .add, .shift, .stop
  );

  rca #(.W(N)) u_add (.a(a_q), .b(m_q), .cin(1'b0), .sum(sum), .cout(cout));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q <= '0;
      q_q <= '0;
      a_q <= '0;
      c_q <= 1'b0;
    end else if (load) begin
      m_q <= multiplicand;
      q_q <= multiplier;
      a_q <= '0;
      c_q <= 1'b0;
    end else if (add) begin
      {c_q, a_q} <= {cout, sum};
    end else if (shift) begin
      {c_q, a_q, q_q} <= {1'b0, c_q, a_q, q_q[N-1:1]};
    end
  end

  assign product = {a_q, q_q};
endmodule
