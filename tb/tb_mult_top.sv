// tb_mult_top: end-to-end test of the six multipliers at their default
// size (N = 8), all running at once.
// The two Booth multipliers get a new signed operand pair almost every
// clock (with some idle clocks); both products are checked against a * b
// one clock later. The three serial multipliers run back to back on
// random operands (signed for the sequential Booth unit) and are checked
// against a * b, with their latencies (add-and-shift 1 + 2N + ones,
// sequential Booth N, 0/a/2a/3a 1 + N/2, carry-save N/2 clocks). It also counts how often each mechanism occurs: the
// add-and-shift TEST->ADD and TEST->SHIFT paths and adder carry-outs,
// sequential Booth add, subtract and shift-only steps,
// every radix-4 Booth digit (-2..+2) and radix-2 digit (-1, 0, +1), idle
// Booth clocks, and every 0/a/2a/3a multiplexer choice; a mechanism that
// never occurs counts as a failure.
module tb_mult_top;
  import mult_pkg::*;
  localparam int unsigned N = 8;

  logic clk = 0, rst_n = 0;
  logic sa_start = 0, sa_stop, bo_valid_in = 0, r2_valid, r4_valid;
  logic s3_start = 0, s3_done, sc_start = 0, sc_done, bs_start = 0, bs_done;
  logic [N-1:0] bs_a, bs_b, sa_a, sa_b, bo_a, bo_b, s3_a, s3_x, sc_a, sc_x;
  logic [2*N-1:0] bs_product, sa_product, r2_product, r4_product, s3_product, sc_product;
  int checks = 0, failures = 0;
  bit booth_done = 0, sa_fin = 0, s3_fin = 0, sc_fin = 0, bs_fin = 0;

  // mechanism counters
  int n_sa_add = 0, n_sa_skip = 0, n_sa_carry = 0, n_bo_idle = 0;
  int n_r4_digit [5];   // index digit + 2
  int n_r2_digit [3];   // index digit + 1
  int n_s3_choice [4];
  int n_sc_both = 0;
  int n_bs_step [3];    // shift only, add, subtract

  mult_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // mechanism monitor
  always @(posedge clk) if (rst_n) begin
    if (dut.u_sa.u_ctrl.state == SA_TEST) begin
      if (dut.u_sa.q_q[0]) n_sa_add++; else n_sa_skip++;
    end
    if (dut.u_sa.add && dut.u_sa.cout) n_sa_carry++;
    if (!bo_valid_in) n_bo_idle++;
    else begin
      for (int i = 0; i < N / 2; i++) begin
        booth_sel_t s;
        s = dut.u_r4.sel[i];
        n_r4_digit[!s.mul ? 2 : (s.twocom ? (s.shift ? 0 : 1) : (s.shift ? 4 : 3))]++;
      end
      for (int i = 0; i < N; i++) begin
        booth_sel_t s;
        s = dut.u_r2.sel[i];
        n_r2_digit[!s.mul ? 1 : (s.twocom ? 0 : 2)]++;
      end
    end
    if (!s3_done && !dut.u_s3.loading) n_s3_choice[dut.u_s3.x_q[1:0]]++;
    if (!sc_done && dut.u_sc.x_q[1:0] == 2'b11) n_sc_both++;
    if (!bs_done) begin
      unique case ({dut.u_bs.q_q[0], dut.u_bs.q1_q})
        2'b01:   n_bs_step[1]++;
        2'b10:   n_bs_step[2]++;
        default: n_bs_step[0]++;
      endcase
    end
  end

  // Booth multipliers: a pair per clock
  initial begin
    bo_a = '0; bo_b = '0;
    wait (rst_n);
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if (i > 0 && bo_valid_in) begin
        check($signed(r2_product) == $signed(bo_a) * $signed(bo_b), "radix-2 product");
        check($signed(r4_product) == $signed(bo_a) * $signed(bo_b), "radix-4 product");
      end
      if (i > 0) check(r2_valid == bo_valid_in && r4_valid == bo_valid_in, "Booth valid");
      bo_a = N'($urandom); bo_b = N'($urandom);
      if (i == 1) begin bo_a = 8'h80; bo_b = 8'h80; end
      if (i == 2) begin bo_a = 8'h80; bo_b = 8'h7f; end
      bo_valid_in = ($urandom % 10) != 0;
    end
    @(negedge clk);
    if (bo_valid_in) check($signed(r4_product) == $signed(bo_a) * $signed(bo_b), "radix-4 product");
    bo_valid_in = 0;
    booth_done = 1;
  end

  // add-and-shift
  initial begin
    sa_a = '0; sa_b = '0;
    wait (rst_n);
    for (int t = 0; t < 300; t++) begin
      logic [N-1:0] ta, tb;
      int cycles;
      ta = N'($urandom); tb = N'($urandom);
      if (t == 0) begin ta = '1; tb = '1; end
      @(negedge clk);
      sa_a = ta; sa_b = tb; sa_start = 1;
      @(negedge clk);
      sa_start = 0;
      cycles = 0;
      while (!sa_stop && cycles < 100) begin
        @(negedge clk);
        cycles++;
      end
      check(sa_product == (2*N)'(ta) * (2*N)'(tb), "add-and-shift product");
      check(cycles == 1 + 2 * N + $countones(tb), "add-and-shift latency");
    end
    sa_fin = 1;
  end

  // sequential radix-2 Booth
  initial begin
    bs_a = '0; bs_b = '0;
    wait (rst_n);
    for (int t = 0; t < 1000; t++) begin
      logic [N-1:0] ta, tb;
      int cycles;
      ta = N'($urandom); tb = N'($urandom);
      if (t == 0) begin ta = 8'h80; tb = 8'h80; end
      @(negedge clk);
      bs_a = ta; bs_b = tb; bs_start = 1;
      @(negedge clk);
      bs_start = 0;
      cycles = 0;
      while (!bs_done && cycles < 100) begin
        @(negedge clk);
        cycles++;
      end
      check($signed(bs_product) == $signed(ta) * $signed(tb), "sequential Booth product");
      check(cycles == N, "sequential Booth latency");
    end
    bs_fin = 1;
  end

  // serial 0/a/2a/3a
  initial begin
    s3_a = '0; s3_x = '0;
    wait (rst_n);
    for (int t = 0; t < 1000; t++) begin
      logic [N-1:0] ta, tx;
      int cycles;
      ta = N'($urandom); tx = N'($urandom);
      @(negedge clk);
      s3_a = ta; s3_x = tx; s3_start = 1;
      @(negedge clk);
      s3_start = 0;
      cycles = 0;
      while (!s3_done && cycles < 100) begin
        @(negedge clk);
        cycles++;
      end
      check(s3_product == (2*N)'(ta) * (2*N)'(tx), "0/a/2a/3a product");
      check(cycles == 1 + N / 2, "0/a/2a/3a latency");
    end
    s3_fin = 1;
  end

  // serial carry-save
  initial begin
    sc_a = '0; sc_x = '0;
    wait (rst_n);
    for (int t = 0; t < 1000; t++) begin
      logic [N-1:0] ta, tx;
      int cycles;
      ta = N'($urandom); tx = N'($urandom);
      @(negedge clk);
      sc_a = ta; sc_x = tx; sc_start = 1;
      @(negedge clk);
      sc_start = 0;
      cycles = 0;
      while (!sc_done && cycles < 100) begin
        @(negedge clk);
        cycles++;
      end
      check(sc_product == (2*N)'(ta) * (2*N)'(tx), "carry-save product");
      check(cycles == N / 2, "carry-save latency");
    end
    sc_fin = 1;
  end

  initial begin
    foreach (n_r4_digit[i]) n_r4_digit[i] = 0;
    foreach (n_r2_digit[i]) n_r2_digit[i] = 0;
    foreach (n_s3_choice[i]) n_s3_choice[i] = 0;
    foreach (n_bs_step[i]) n_bs_step[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (booth_done && sa_fin && s3_fin && sc_fin && bs_fin);
    $display("add-and-shift: TEST->ADD %0d, TEST->SHIFT %0d, adder carry-outs %0d",
             n_sa_add, n_sa_skip, n_sa_carry);
    $display("radix-4 digits -2..+2: %0d %0d %0d %0d %0d", n_r4_digit[0], n_r4_digit[1],
             n_r4_digit[2], n_r4_digit[3], n_r4_digit[4]);
    $display("radix-2 digits -1..+1: %0d %0d %0d", n_r2_digit[0], n_r2_digit[1], n_r2_digit[2]);
    $display("Booth idle clocks: %0d", n_bo_idle);
    $display("0/a/2a/3a choices: %0d %0d %0d %0d", n_s3_choice[0], n_s3_choice[1],
             n_s3_choice[2], n_s3_choice[3]);
    $display("carry-save steps with both multiples: %0d", n_sc_both);
    $display("sequential Booth steps shift/add/subtract: %0d %0d %0d", n_bs_step[0],
             n_bs_step[1], n_bs_step[2]);
    check(n_sa_add > 0, "mechanism TEST->ADD");
    check(n_sa_skip > 0, "mechanism TEST->SHIFT");
    check(n_sa_carry > 0, "mechanism adder carry-out");
    check(n_bo_idle > 0, "mechanism Booth idle clock");
    foreach (n_r4_digit[i]) check(n_r4_digit[i] > 0, "mechanism radix-4 digit");
    foreach (n_r2_digit[i]) check(n_r2_digit[i] > 0, "mechanism radix-2 digit");
    foreach (n_s3_choice[i]) check(n_s3_choice[i] > 0, "mechanism 0/a/2a/3a choice");
    check(n_sc_both > 0, "mechanism carry-save both multiples");
    foreach (n_bs_step[i]) check(n_bs_step[i] > 0, "mechanism sequential Booth step");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
