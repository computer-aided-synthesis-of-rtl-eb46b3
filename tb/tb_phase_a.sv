// tb_phase_a: loads random 8-word vectors into the butterfly register and
// reads the bit planes back, one per shift, reassembling the 9-bit sums
// and differences; compares them with x[m] + x[7-m] and x[m] - x[7-m].
module tb_phase_a;
  localparam int N = 8, IW = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, load = 0, shift = 0;
  logic signed [IW-1:0] x [N];
  logic [N/2-1:0] sbit, dbit;

  phase_a #(.N(N), .IW(IW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int m = 0; m < N; m++) x[m] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 200; t++) begin
      logic [IW:0] s_got [N/2], d_got [N/2];
      for (int m = 0; m < N; m++)
        x[m] = (t == 0) ? -128 : (t == 1) ? ((m < 4) ? 127 : -128) : IW'($urandom);
      load = 1;
      @(negedge clk);
      load = 0;
      for (int q = 0; q <= IW; q++) begin
        for (int m = 0; m < N / 2; m++) begin
          s_got[m][q] = sbit[m];
          d_got[m][q] = dbit[m];
        end
        shift = 1;
        @(negedge clk);
        shift = 0;
      end
      for (int m = 0; m < N / 2; m++) begin
        int es, ed;
        es = int'(x[m]) + int'(x[N-1-m]);
        ed = int'(x[m]) - int'(x[N-1-m]);
        checks += 2;
        if (int'($signed(s_got[m])) != es) begin
          failures++;
          $display("FAIL: s[%0d] = %0d expected %0d", m, $signed(s_got[m]), es);
        end
        if (int'($signed(d_got[m])) != ed) begin
          failures++;
          $display("FAIL: d[%0d] = %0d expected %0d", m, $signed(d_got[m]), ed);
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
