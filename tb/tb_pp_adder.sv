// tb_pp_adder: self-checking test of the partial-product adder.
// Two instances, 4 rows and 8 rows of 16 bits, fed random rows and a
// random constant; the reference is the plain sum of all of them modulo
// 2^16.
module tb_pp_adder;
  localparam int unsigned W = 16;
  logic [W-1:0] r4 [4];
  logic [W-1:0] r8 [8];
  logic [W-1:0] k, s4, s8, ref4, ref8;
  int checks = 0, failures = 0;

  pp_adder #(.ROWS(4), .W(W)) dut4 (.rows(r4), .k(k), .sum(s4));
  pp_adder #(.ROWS(8), .W(W)) dut8 (.rows(r8), .k(k), .sum(s8));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      k = W'($urandom);
      ref4 = k; ref8 = k;
      for (int j = 0; j < 8; j++) begin
        r8[j] = (i == 0) ? '1 : W'($urandom);
        ref8 += r8[j];
        if (j < 4) begin
          r4[j] = (i == 1) ? '1 : W'($urandom);
          ref4 += r4[j];
        end
      end
      #1;
      checks += 2;
      if (s4 !== ref4) begin
        failures++;
        if (failures < 10) $display("FAIL 4 rows: %h expected %h", s4, ref4);
      end
      if (s8 !== ref8) begin
        failures++;
        if (failures < 10) $display("FAIL 8 rows: %h expected %h", s8, ref8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
