// tb_booth_r4_mult: self-checking test of the parallel radix-4 Booth
// multiplier. All 65536 signed 8 x 8 operand pairs are applied, one per
// clock with valid_in high, plus idle clocks; each product must equal the
// signed product a * b one clock later, with valid_out following valid_in
// by one clock. A 16-bit instance is also checked on random operands.
module tb_booth_r4_mult;
  localparam int unsigned N = 8;
  logic clk = 0, rst_n = 0, vin = 0, vout, vin16 = 0, vout16;
  logic [N-1:0] a, b;
  logic [2*N-1:0] p;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  int checks = 0, failures = 0;

  booth_r4_mult #(.N(N)) dut (.clk, .rst_n, .valid_in(vin), .a, .b, .valid_out(vout), .product(p));
  booth_r4_mult #(.N(16)) dut16 (.clk, .rst_n, .valid_in(vin16), .a(a16), .b(b16),
                                 .valid_out(vout16), .product(p16));

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0; b = '0; a16 = '0; b16 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (vout !== 1'b0) failures++;
    for (int i = 0; i < 65536; i++) begin
      a = N'(i); b = N'(i >> 8); vin = (i % 97 != 5);
      @(negedge clk);
      checks++;
      if (vout !== vin) begin
        failures++;
        if (failures < 10) $display("FAIL valid_out at %0d", i);
      end
      if (vin) begin
        checks++;
        if ($signed(p) !== $signed(a) * $signed(b)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d = %0d", $signed(a), $signed(b), $signed(p));
        end
      end
    end
    vin = 0;
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] ta, tb;
      ta = 16'($urandom); tb = 16'($urandom);
      if (i == 0) begin ta = 16'h8000; tb = 16'h8000; end
      a16 = ta; b16 = tb; vin16 = 1;
      @(negedge clk);
      checks++;
      if (!vout16 || $signed(p16) !== $signed(ta) * $signed(tb)) begin
        failures++;
        if (failures < 10) $display("FAIL16 %0d*%0d = %0d", $signed(ta), $signed(tb), $signed(p16));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
