// tb_cu: runs the control unit for many vector periods and checks its
// schedule against counters kept here: one pixel strobe every 2 clocks,
// a vector strobe every 16, the bit-serial windows of 9 and 12 clocks with
// first/last at their ends, the TMEM direction flipping every 8 vectors
// one period after each input block starts, and output framing starting
// after 11 periods.
module tb_cu;
  localparam int N = 8, CPP = 2, W1 = 9, W2 = 12, P = N * CPP;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic pix_stb, or_shift, vec_stb, in_sob, dir;
  logic s1_en, s1_first, s1_last, s2_en, s2_first, s2_last, out_valid, out_sob;

  cu #(.N(N), .CPP(CPP), .W1(W1), .W2(W2)) dut (.*);
  always #5 clk = ~clk;

  task automatic expect_bit(input string name, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL: %s = %0b expected %0b", name, got, exp);
    end
  endtask

  initial begin
    int dir_m, flips;
    dir_m = 0; flips = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 40 * P; t++) begin
      int c, v, per;
      c = t % P;
      per = t / P;
      v = per % N;
      // The direction flips after the vector strobe that ends period 0 of
      // a block, so it changes at the start of period 1.
      if (c == 0 && v == 1 && per > 0) begin
        dir_m = 1 - dir_m;
        flips++;
      end
      expect_bit("pix_stb", pix_stb, (c % CPP) == 0);
      expect_bit("or_shift", or_shift, (c % CPP) == CPP - 1);
      expect_bit("vec_stb", vec_stb, c == P - 1);
      expect_bit("in_sob", in_sob, c == 0 && v == 0);
      expect_bit("s1_en", s1_en, c < W1);
      expect_bit("s1_first", s1_first, c == 0);
      expect_bit("s1_last", s1_last, c == W1 - 1);
      expect_bit("s2_en", s2_en, c < W2);
      expect_bit("s2_first", s2_first, c == 0);
      expect_bit("s2_last", s2_last, c == W2 - 1);
      expect_bit("dir", dir, 1'(dir_m));
      expect_bit("out_valid", out_valid, per >= N + 3);
      expect_bit("out_sob", out_sob, per >= N + 3 && c == 0 && v == (N + 3) % N);
      @(negedge clk);
    end
    checks++;
    if (flips < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50 * P) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
