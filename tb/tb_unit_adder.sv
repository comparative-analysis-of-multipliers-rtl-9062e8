// tb_unit_adder: self-checking test of the unit adder (4:2 compressor).
// All 32 input combinations: checks x0+x1+x2+x3+c1 == s + 2*(c + c0) and
// that c0 does not depend on c1.
module tb_unit_adder;
  logic [3:0] x;
  logic c1, s, c, c0, c0_prev;
  int checks = 0, failures = 0;

  unit_adder dut (.x, .c1, .s, .c, .c0);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int k = 0; k < 2; k++) begin
        x = 4'(i); c1 = k[0];
        #1;
        checks++;
        if (32'(s) + 2 * (32'(c) + 32'(c0)) != 32'($countones(x)) + 32'(c1)) begin
          failures++;
          $display("FAIL x=%b c1=%b -> s=%b c=%b c0=%b", x, c1, s, c, c0);
        end
        if (k == 1) begin
          checks++;
          if (c0 !== c0_prev) begin
            failures++;
            $display("FAIL c0 depends on c1 for x=%b", x);
          end
        end
        c0_prev = c0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
