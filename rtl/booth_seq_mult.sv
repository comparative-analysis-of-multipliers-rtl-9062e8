// booth_seq_mult: sequential radix-2 Booth multiplier, signed N x N.
//
// Booth's algorithm run one step per clock on an add-and-shift datapath.
// The product register {A, Q, q_1} starts as zeros in A, the multiplier
// in Q and a 0 in the extra bit q_1 to the right of Q. Each step looks at
// the two rightmost bits {Q[0], q_1}: 01 adds the multiplicand M to A, 10
// subtracts it (A + ~M + 1 through the same ripple-carry adder), 00 and
// 11 leave A alone; then {A, Q, q_1} shifts right one place arithmetically
// (A's sign bit is copied). After N steps the signed product is {A, Q}.
// A and M are one bit wider than the operands: with N-bit A, subtracting
// M = -2^(N-1) overflows, so the guard bit is this design's addition.
// Starting from zeros followed by the multiplier, and choosing the step
// from the two rightmost bits, follow the source description of Booth's
// algorithm; one step per clock, the start/done handshake and the reset
// are this design's choices.
// Interface and timing: start is taken while done is high and the
// operands are captured in that clock; done rises N clocks later and
// product holds until the next start.
module booth_seq_mult #(
  parameter int unsigned N = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   multiplicand,
  input  logic [N-1:0]   multiplier,
  output logic           done,
  output logic [2*N-1:0] product
);
  localparam int unsigned CW = $clog2(N + 1);

  logic [N:0]    m_q, a_q, addend, sum, a_next;  // one guard bit
  logic [N-1:0]  q_q;
  logic          q1_q, busy, sub, c_unused;
  logic [CW-1:0] steps;

  // 10 -> subtract, 01 -> add, 00/11 -> keep A
  assign sub    = q_q[0] & ~q1_q;
  assign addend = sub ? ~m_q : m_q;
  rca #(.W(N + 1)) u_add (.a(a_q), .b(addend), .cin(sub), .sum(sum), .cout(c_unused));
  assign a_next = (q_q[0] ^ q1_q) ? sum : a_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q <= '0; a_q <= '0; q_q <= '0; q1_q <= 1'b0; steps <= '0; busy <= 1'b0;
    end else if (busy) begin
      {a_q, q_q, q1_q} <= {a_next[N], a_next, q_q};
      steps <= steps + 1'b1;
      if (steps + 1'b1 == CW'(N)) busy <= 1'b0;
    end else if (start) begin
      m_q   <= {multiplicand[N-1], multiplicand};
      a_q   <= '0;
      q_q   <= multiplier;
      q1_q  <= 1'b0;
      steps <= '0;
      busy  <= 1'b1;
    end
  end

  assign done    = ~busy;
  assign product = {a_q[N-1:0], q_q};
endmodule
