// tb_phase_b: feeds the eight SMAs the bit planes of random butterfly
// sums and differences and checks that output k is frequency k: even k
// from the sums, odd k from the differences, each bit-exact against the
// distributed-arithmetic sum worked out here.
module tb_phase_b;
  import bdct_ref_pkg::*;
  localparam int N = 8, W = 9, RS = 11, FRAC = 9, OS = 11, G = 1;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0, first = 0, last = 0;
  logic [N/2-1:0] sbit = '0, dbit = '0;
  logic signed [OS-1:0] z [N];

  phase_b #(.N(N), .W(W), .RS(RS), .FRAC(FRAC), .OS(OS), .G(G)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 100; t++) begin
      longint s [N/2], d [N/2], ts [N], r;
      for (int m = 0; m < N / 2; m++) begin
        s[m] = longint'($signed(9'($urandom)));
        d[m] = longint'($signed(9'($urandom)));
      end
      for (int k = 0; k < N; k++) ts[k] = 0;
      for (int q = 0; q < W; q++) begin
        int as, ad;
        as = 0; ad = 0;
        for (int m = 0; m < N / 2; m++) begin
          as[m] = ((s[m] >>> q) & 1) != 0;
          ad[m] = ((d[m] >>> q) & 1) != 0;
        end
        for (int k = 0; k < N; k++) begin
          longint l;
          l = lut_ref(N, k, FRAC, (k % 2 == 0) ? as : ad);
          ts[k] += (q == W - 1) ? -(l << q) : (l << q);
        end
        en = 1; first = (q == 0); last = (q == W - 1);
        sbit = (N/2)'(as); dbit = (N/2)'(ad);
        @(negedge clk);
      end
      en = 0; first = 0; last = 0;
      for (int k = 0; k < N; k++) begin
        r = (ts[k] + (longint'(1) << (FRAC - G - 1))) >>> (FRAC - G);
        checks++;
        if (longint'(z[k]) != r) begin
          failures++;
          $display("FAIL: z[%0d] = %0d expected %0d", k, z[k], r);
        end
      end
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
