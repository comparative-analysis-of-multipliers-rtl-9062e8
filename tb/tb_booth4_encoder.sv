// tb_booth4_encoder: self-checking test of the radix-4 Booth encoder.
// All eight groups; the reference digit is -2*y(2i+1) + y(2i) + y(2i-1),
// and the select lines must read mul = (d != 0), shift = (|d| == 2),
// twocom = (d < 0).
module tb_booth4_encoder;
  import mult_pkg::*;
  logic [2:0] grp;
  booth_sel_t sel;
  int checks = 0, failures = 0;

  booth4_encoder dut (.grp, .sel);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      int d;
      grp = 3'(g);
      d = -2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
      #1;
      checks++;
      if (sel.mul !== (d != 0) || sel.shift !== (d == 2 || d == -2) || sel.twocom !== (d < 0)) begin
        failures++;
        $display("FAIL grp=%b d=%0d sel=%b%b%b", grp, d, sel.mul, sel.shift, sel.twocom);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
