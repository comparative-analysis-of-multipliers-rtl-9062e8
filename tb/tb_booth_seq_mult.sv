// tb_booth_seq_mult: self-checking test of the sequential radix-2 Booth
// multiplier. All 65536 signed 8 x 8 operand pairs; the product must equal
// the signed product a * b and done must rise exactly N clocks after the
// clock that takes start. Operands change during a run. A 16-bit instance
// is checked on random and extreme operands.
module tb_booth_seq_mult;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0, start = 0, done, start16 = 0, done16;
  logic [N-1:0] a, b;
  logic [2*N-1:0] p;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  int checks = 0, failures = 0;

  booth_seq_mult #(.N(N)) dut (.clk, .rst_n, .start, .multiplicand(a), .multiplier(b),
                               .done, .product(p));
  booth_seq_mult #(.N(16)) dut16 (.clk, .rst_n, .start(start16), .multiplicand(a16),
                                  .multiplier(b16), .done(done16), .product(p16));

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; a16 = '0; b16 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 65536; i++) begin
      logic [N-1:0] ta, tb;
      int cycles;
      ta = N'(i); tb = N'(i >> 8);
      @(negedge clk);
      a = ta; b = tb; start = 1;
      @(negedge clk);
      start = 0; a = ~ta; b = ~tb;
      cycles = 0;
      while (!done && cycles < 100) begin
        @(negedge clk);
        cycles++;
      end
      checks += 2;
      if ($signed(p) !== $signed(ta) * $signed(tb)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d = %0d", $signed(ta), $signed(tb), $signed(p));
      end
      if (cycles != N) begin
        failures++;
        if (failures < 10) $display("FAIL latency %0d", cycles);
      end
    end
    for (int t = 0; t < 500; t++) begin
      logic [15:0] ta, tb;
      ta = 16'($urandom); tb = 16'($urandom);
      if (t == 0) begin ta = 16'h8000; tb = 16'h8000; end
      if (t == 1) begin ta = 16'h7fff; tb = 16'h8000; end
      @(negedge clk);
      a16 = ta; b16 = tb; start16 = 1;
      @(negedge clk);
      start16 = 0;
      while (!done16) @(negedge clk);
      checks++;
      if ($signed(p16) !== $signed(ta) * $signed(tb)) begin
        failures++;
        if (failures < 10) $display("FAIL16 %0d*%0d = %0d", $signed(ta), $signed(tb), $signed(p16));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
