// tb_sma_lut: checks every table word of every frequency of the 8-point
// distributed-arithmetic look-up table against sums of cosines computed
// here, and that the table words reach the largest magnitude expected.
module tb_sma_lut;
  import bdct_ref_pkg::*;
  localparam int N = 8, RS = 11, FRAC = 9;
  int checks = 0, failures = 0;
  logic [N/2-1:0] addr;
  logic signed [RS-1:0] val [N];

  for (genvar k = 0; k < N; k++) begin : g_k
    sma_lut #(.N(N), .K(k), .RS(RS), .FRAC(FRAC)) dut (.addr(addr), .val(val[k]));
  end

  initial begin
    longint maxv;
    maxv = 0;
    for (int a = 0; a < (1 << (N / 2)); a++) begin
      addr = (N/2)'(a);
      #1;
      for (int k = 0; k < N; k++) begin
        longint e;
        e = lut_ref(N, k, FRAC, a);
        checks++;
        if (longint'(val[k]) != e) begin
          failures++;
          $display("FAIL: K=%0d addr=%0h val=%0d expected %0d", k, a, val[k], e);
        end
        if (longint'(val[k]) > maxv) maxv = longint'(val[k]);
      end
    end
    // DC with all four inputs set: 4/sqrt(8) = sqrt(2), times 2^9 = 724.
    checks++;
    if (maxv != 724) begin
      failures++;
      $display("FAIL: largest entry %0d, expected 724", maxv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
