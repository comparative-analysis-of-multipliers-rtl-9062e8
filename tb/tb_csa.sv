// tb_csa: self-checking test of the carry-save adder row.
// Random 12-bit x, y, z; checks s + c == x + y + z (mod 2^12) and that
// s is the bitwise sum x ^ y ^ z (no carry moves sideways).
module tb_csa;
  localparam int unsigned W = 12;
  logic [W-1:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  csa #(.W(W)) dut (.x, .y, .z, .s, .c);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      x = W'($urandom); y = W'($urandom); z = W'($urandom);
      if (i == 0) begin x = '1; y = '1; z = '1; end
      #1;
      checks++;
      if (W'(s + c) !== W'(x + y + z) || s !== (x ^ y ^ z)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h z=%h s=%h c=%h", x, y, z, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
