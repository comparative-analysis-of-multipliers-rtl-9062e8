// tb_booth_ppg: self-checking test of the Booth partial-product generator.
// Every 8-bit multiplicand with every legal select combination (digits
// -2..+2); the row, with its sign bit flipped back, must equal d * x as a
// 10-bit two's-complement number.
module tb_booth_ppg;
  import mult_pkg::*;
  localparam int unsigned N = 8;
  logic [N-1:0] x;
  booth_sel_t   sel;
  logic [N+1:0] pp;
  int checks = 0, failures = 0;

  booth_ppg #(.N(N)) dut (.x, .sel, .pp);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int d = -2; d <= 2; d++) begin
        logic signed [N+1:0] got;
        int expect_v;
        x = N'(i);
        sel.mul    = (d != 0);
        sel.shift  = (d == 2 || d == -2);
        sel.twocom = (d < 0);
        #1;
        got = {~pp[N+1], pp[N:0]};
        expect_v = d * int'($signed(x));
        checks++;
        if (int'(got) != expect_v) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d d=%0d got %0d", $signed(x), d, got);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
