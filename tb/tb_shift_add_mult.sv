// tb_shift_add_mult: self-checking test of the add-and-shift multiplier.
// Random and corner unsigned 8-bit operands; the product must equal a * b
// and stop must rise exactly 1 + 2N + (ones in b) clocks after the clock
// that takes start. Operands change while a run is busy to show they are
// held in the multiplier's own registers.
module tb_shift_add_mult;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0, start = 0, stop;
  logic [N-1:0] a, b;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;

  shift_add_mult #(.N(N)) dut (.clk, .rst_n, .start, .multiplicand(a), .multiplier(b),
                               .stop, .product(p));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      logic [N-1:0] ta, tb;
      int cycles;
      ta = N'($urandom); tb = N'($urandom);
      if (t == 0) begin ta = '1; tb = '1; end
      if (t == 1) begin ta = '1; tb = '0; end
      if (t == 2) begin ta = '0; tb = '1; end
      @(negedge clk);
      a = ta; b = tb; start = 1;
      @(negedge clk);
      start = 0;
      cycles = 0;
      @(negedge clk);  // the operands are loaded in the clock after start
      a = ~ta; b = ~tb;
      cycles++;
      while (!stop && cycles < 200) begin
        @(negedge clk);
        cycles++;
      end
      checks += 2;
      if (p !== (2*N)'(ta) * (2*N)'(tb)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d = %0d", ta, tb, p);
      end
      if (cycles != 1 + 2 * N + $countones(tb)) begin
        failures++;
        if (failures < 10) $display("FAIL latency %0d for b=%b", cycles, tb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
