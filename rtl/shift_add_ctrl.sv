// shift_add_ctrl: controller of the add-and-shift multiplier.
//
// A five-state machine. IDLE holds stop high and waits for start. INIT
// loads the operands (load) and clears the shift counter. TEST looks at
// the multiplier LSB: 1 goes to ADD (add, the multiplicand is added into
// the upper half), 0 goes straight to SHIFT. SHIFT shifts the register
// pair right one place (shift) and counts; after the N-th shift it returns
// to IDLE, otherwise to TEST. Every state lasts one clock, so one product
// takes 1 + 2N + (ones in the multiplier) clocks with stop low.
// The states and their order follow the add-and-shift controller; the
// one-clock-per-state timing, the counter test after the increment and
// the asynchronous active-low reset are this design's choices.
module shift_add_ctrl
  import mult_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic lsb,
  output logic load,
  output logic add,
  output logic shift,
  output logic stop
);
  localparam int unsigned CW = $clog2(N + 1);

  sa_state_t     state, state_n;
  logic [CW-1:0] count;

  always_comb begin
    state_n = state;
    unique case (state)
      SA_IDLE:  if (start) state_n = SA_INIT;
      SA_INIT:  state_n = SA_TEST;
      SA_TEST:  state_n = lsb ? SA_ADD : SA_SHIFT;
      SA_ADD:   state_n = SA_SHIFT;
      SA_SHIFT: state_n = (count + 1'b1 == CW'(N)) ? SA_IDLE : SA_TEST;
      default:  state_n = SA_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= SA_IDLE;
      count <= '0;
    end else begin
      state <= state_n;
      if (state == SA_INIT)       count <= '0;
      else if (state == SA_SHIFT) count <= count + 1'b1;
    end
  end

  assign load  = (state == SA_INIT);
  assign add   = (state == SA_ADD);
  assign shift = (state == SA_SHIFT);
  assign stop  = (state == SA_IDLE);

  // The counter never passes N.
  assert property (@(posedge clk) count <= CW'(N));
endmodule
