// tb_shift_add_ctrl: self-checking test of the add-and-shift controller.
// The testbench plays the datapath: it feeds the controller the LSBs of a
// random multiplier, shifting its own copy on each shift command. It checks
// the command sequence (one load, then per bit an optional add followed
// by a shift, add only when the LSB is 1), the total of 1 + 2N + ones
// clocks with stop low, and that stop stays high with no start.
module tb_shift_add_ctrl;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0, start = 0, lsb;
  logic load, add, shift, stop;
  logic [N-1:0] q;
  int checks = 0, failures = 0;

  shift_add_ctrl #(.N(N)) dut (.clk, .rst_n, .start, .lsb, .load, .add, .shift, .stop);

  always #5 clk = ~clk;
  assign lsb = q[0];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    q = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(stop, "stop high after reset");
    repeat (3) @(posedge clk);
    check(stop && !load && !add && !shift, "idle without start");
    for (int t = 0; t < 60; t++) begin
      logic [N-1:0] mult;
      int cycles, loads, adds, shifts, expected_adds;
      bit order_ok;
      mult = (t == 0) ? '0 : (t == 1) ? '1 : N'($urandom);
      q = mult;
      expected_adds = $countones(mult);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      cycles = 0; loads = 0; adds = 0; shifts = 0; order_ok = 1;
      while (!stop && cycles < 100) begin
        if (load) loads++;
        if (add) begin
          adds++;
          if (!q[0]) order_ok = 0;
        end
        if (shift) begin
          shifts++;
          q = q >> 1;
        end
        if (int'(load) + int'(add) + int'(shift) > 1) order_ok = 0;
        cycles++;
        @(negedge clk);
      end
      check(loads == 1, "one load");
      check(shifts == N, "N shifts");
      check(adds == expected_adds, "one add per 1 bit");
      check(order_ok, "commands exclusive, add only on LSB 1");
      check(cycles == 1 + 2 * N + expected_adds, "cycle count 1+2N+ones");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
