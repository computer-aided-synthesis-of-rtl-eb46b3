// tb_tmem: streams random 8x8 blocks through the transposition memory the
// way the chip does (one vector per shift, direction flipped every 8
// shifts) and checks that each block comes out transposed, 8 shifts after
// it went in, in both directions; also checks that nothing moves without
// a shift.
module tb_tmem;
  localparam int N = 8, W = 11, NBLK = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, shift = 0, dir = 0;
  logic [W-1:0] din [N], dout [N];
  logic [W-1:0] blk [NBLK][N][N];  // [block][vector i][element j]

  tmem #(.N(N), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    int ndir [2];
    ndir[0] = 0; ndir[1] = 0;
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) blk[b][i][j] = W'($urandom);
    for (int j = 0; j < N; j++) din[j] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int s = 0; s < (NBLK + 1) * N; s++) begin
      int b, i;
      b = s / N;
      i = s % N;
      if (i == 0 && s != 0) dir = ~dir;
      #1;
      // Before shift s, the output shows vector i of block b-1 transposed.
      if (b >= 1) begin
        for (int j = 0; j < N; j++) begin
          checks++;
          if (dout[j] != blk[b-1][j][i]) begin
            failures++;
            $display("FAIL: block %0d out %0d elem %0d = %0h expected %0h", b - 1, i, j,
                     dout[j], blk[b-1][j][i]);
          end
        end
        ndir[dir]++;
      end
      for (int j = 0; j < N; j++) din[j] = (b < NBLK) ? blk[b][i][j] : '0;
      // An idle clock must not disturb anything.
      @(negedge clk);
      shift = 1;
      @(negedge clk);
      shift = 0;
    end
    checks++;
    if (ndir[0] == 0 || ndir[1] == 0) begin
      failures++;
      $display("FAIL: a direction was never read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
