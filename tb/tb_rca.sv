// tb_rca: self-checking test of the ripple-carry adder.
// Exhaustive over 8-bit a, b and carry in; the reference is a + b + cin
// computed with the language's own addition. A watchdog ends the run.
module tb_rca;
  localparam int unsigned W = 8;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  rca #(.W(W)) dut (.a, .b, .cin, .sum, .cout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int k = 0; k < 2; k++) begin
          a = W'(i); b = W'(j); cin = k[0];
          #1;
          checks++;
          if ({cout, sum} !== (W+1)'(i + j + k)) begin
            failures++;
            if (failures < 10) $display("FAIL %0d+%0d+%0d = %0d", i, j, k, {cout, sum});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
