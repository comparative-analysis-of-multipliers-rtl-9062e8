// tb_ua_row: self-checking test of a row of unit adders.
// Random and extreme 10-bit a, b, c, d; checks s + cy == a + b + c + d
// (mod 2^10).
module tb_ua_row;
  localparam int unsigned W = 10;
  logic [W-1:0] a, b, c, d, s, cy;
  int checks = 0, failures = 0;

  ua_row #(.W(W)) dut (.a, .b, .c, .d, .s, .cy);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      a = W'($urandom); b = W'($urandom); c = W'($urandom); d = W'($urandom);
      if (i == 0) begin a = '1; b = '1; c = '1; d = '1; end
      #1;
      checks++;
      if (W'(s + cy) !== W'(a + b + c + d)) begin
        failures++;
        if (failures < 10) $display("FAIL %h %h %h %h -> s=%h cy=%h", a, b, c, d, s, cy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
