// tb_sma: drives one serial multiplier-accumulator (frequency K = 3) with
// the bit planes of random 9-bit words, LSB first, and compares the result
// after W clocks with the bit-exact distributed-arithmetic sum worked out
// here, and with the real product sum within a tolerance.  Includes
// extreme words (all most-negative, all most-positive) and back-to-back
// runs without reset, so the accumulator must restart on `first`.
module tb_sma;
  import bdct_ref_pkg::*;
  localparam int N = 8, K = 3, W = 9, RS = 11, FRAC = 9, OS = 11, G = 1;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0, first = 0, last = 0;
  logic [N/2-1:0] bits = '0;
  logic signed [OS-1:0] result;

  sma #(.N(N), .K(K), .W(W), .RS(RS), .FRAC(FRAC), .OS(OS), .G(G)) dut (.*);
  always #5 clk = ~clk;

  task automatic run(input longint w [N/2]);
    longint t, r;
    int sh;
    real rv;
    t = 0;
    for (int q = 0; q < W; q++) begin
      int a;
      a = 0;
      for (int m = 0; m < N / 2; m++) a[m] = ((w[m] >>> q) & 1) != 0;
      @(negedge clk);
      en = 1; first = (q == 0); last = (q == W - 1); bits = (N/2)'(a);
      if (q == W - 1) t -= lut_ref(N, K, FRAC, a) << q;
      else            t += lut_ref(N, K, FRAC, a) << q;
    end
    @(negedge clk);
    en = 0; first = 0; last = 0;
    sh = FRAC - G;
    r = (t + (longint'(1) << (sh - 1))) >>> sh;
    checks++;
    if (longint'(result) != r) begin
      failures++;
      $display("FAIL: result %0d expected %0d", result, r);
    end
    rv = 0.0;
    for (int m = 0; m < N / 2; m++) rv += coef(N, m, K) * w[m] * 2.0;
    checks++;
    if (rabs(real'(result) - rv) > 2.0) begin
      failures++;
      $display("FAIL: result %0d far from %f", result, rv);
    end
  endtask

  initial begin
    longint w [N/2];
    repeat (2) @(negedge clk);
    rst = 0;
    for (int m = 0; m < N / 2; m++) w[m] = -256;
    run(w);
    for (int m = 0; m < N / 2; m++) w[m] = 255;
    run(w);
    for (int i = 0; i < 300; i++) begin
      for (int m = 0; m < N / 2; m++) w[m] = longint'($signed(9'($urandom)));
      run(w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
