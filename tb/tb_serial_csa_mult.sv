// tb_serial_csa_mult: self-checking test of the serial two-bits-per-clock multiplier
// through two multiplexers and a carry-save adder. Random and corner unsigned 8-bit operands (and a 16-bit instance);
// the product must equal a * x and done must rise exactly N / 2 clocks
// after the clock that takes start. Operands change during a run.
module tb_serial_csa_mult;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0, start = 0, done, start16 = 0, done16;
  logic [N-1:0] a, x;
  logic [2*N-1:0] p;
  logic [15:0] a16, x16;
  logic [31:0] p16;
  int checks = 0, failures = 0;

  serial_csa_mult #(.N(N)) dut (.clk, .rst_n, .start, .a, .x, .done, .product(p));
  serial_csa_mult #(.N(16)) dut16 (.clk, .rst_n, .start(start16), .a(a16), .x(x16), .done(done16), .product(p16));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; x = '0; a16 = '0; x16 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      logic [N-1:0] ta, tx;
      int cycles;
      ta = N'($urandom); tx = N'($urandom);
      if (t == 0) begin ta = '1; tx = '1; end
      if (t == 1) begin ta = '1; tx = 8'b1010_0101; end
      @(negedge clk);
      a = ta; x = tx; start = 1;
      @(negedge clk);
      start = 0; a = ~ta; x = ~tx;
      cycles = 0;
      while (!done && cycles < 100) begin
        @(negedge clk);
        cycles++;
      end
      checks += 2;
      if (p !== (2*N)'(ta) * (2*N)'(tx)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d = %0d", ta, tx, p);
      end
      if (cycles != N / 2) begin
        failures++;
        if (failures < 10) $display("FAIL latency %0d", cycles);
      end
    end
    for (int t = 0; t < 300; t++) begin
      logic [15:0] ta, tx;
      ta = 16'($urandom); tx = 16'($urandom);
      if (t == 0) begin ta = '1; tx = '1; end
      @(negedge clk);
      a16 = ta; x16 = tx; start16 = 1;
      @(negedge clk);
      start16 = 0;
      while (!done16) @(negedge clk);
      checks++;
      if (p16 !== 32'(ta) * 32'(tx)) begin
        failures++;
        if (failures < 10) $display("FAIL16 %0d*%0d = %0d", ta, tx, p16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
