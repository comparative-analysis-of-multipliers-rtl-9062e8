// tb_booth2_encoder: self-checking test of the radix-2 Booth encoder.
// All four pairs; the reference digit is y(i-1) - y(i).
module tb_booth2_encoder;
  import mult_pkg::*;
  logic [1:0] pair;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  booth2_encoder dut (.pair, .sel);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 4; g++) begin
      int d;
      pair = 2'(g);
      d = int'(pair[0]) - int'(pair[1]);
      #1;
      checks++;
      if (sel.mul !== (d != 0) || sel.shift !== 1'b0 || sel.twocom !== (d < 0)) begin
        failures++;
        $display("FAIL pair=%b d=%0d sel=%b%b%b", pair, d, sel.mul, sel.shift, sel.twocom);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
