// tb_bdct_snr: word-size sweep of the DCT chip.  Runs the chip with table
// widths RS1 = RS2 = 9..12 (intermediate width OS1 = 11), with OS1 = 9..12
// (tables 11 bits), and with one table narrowed at a time, on the same
// pseudo-random blocks, checks every output bit-exactly against the
// reference, prints the signal-to-noise ratio of each against the exact
// 2-D DCT, and checks the trends: SNR grows with the table width and
// with the intermediate width, and the chosen sizes (RS = 11, OS1 = 11)
// give more than 50 dB on uniformly distributed 8-bit pixels (about
// 50.7 dB; blocks with more energy, as in tb_bdct_top, reach 52-53 dB).
module tb_bdct_snr;
  localparam int NBLK = 6;
  localparam int NCFG = 9;
  // Configuration c: {RS1, RS2, OS1} = cfg(c, 0..2)
  function automatic int cfg(input int c, input int f);
    int t [3];
    case (c)
      0: t = '{9, 9, 11};
      1: t = '{10, 10, 11};
      2: t = '{11, 11, 11};
      3: t = '{12, 12, 11};
      4: t = '{11, 11, 9};
      5: t = '{11, 11, 10};
      6: t = '{11, 11, 12};
      7: t = '{9, 11, 11};
      default: t = '{11, 9, 11};
    endcase
    return t[f];
  endfunction

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int  checks = 0, failures = 0;
  real snr [NCFG];
  bit  done [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    bdct_snr_probe #(.RS1(cfg(c, 0)), .RS2(cfg(c, 1)), .OS1(cfg(c, 2)), .NBLK(NBLK)) u_probe (
      .clk(clk), .rst(rst));
    always_comb begin
      snr[c]  = u_probe.snr_db;
      done[c] = u_probe.done;
    end
  end

  task automatic expect_less(input int a, input int b);
    checks++;
    if (!(snr[a] < snr[b])) begin
      failures++;
      $display("FAIL: SNR of configuration %0d (%f dB) not below configuration %0d (%f dB)",
               a, snr[a], b, snr[b]);
    end
  endtask

  initial begin
    bit all;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    do begin
      @(posedge clk);
      all = 1'b1;
      for (int c = 0; c < NCFG; c++) all &= done[c];
    end while (!all);
    checks   += g_cfg[0].u_probe.checks + g_cfg[1].u_probe.checks + g_cfg[2].u_probe.checks
              + g_cfg[3].u_probe.checks + g_cfg[4].u_probe.checks + g_cfg[5].u_probe.checks
              + g_cfg[6].u_probe.checks + g_cfg[7].u_probe.checks + g_cfg[8].u_probe.checks;
    failures += g_cfg[0].u_probe.failures + g_cfg[1].u_probe.failures + g_cfg[2].u_probe.failures
              + g_cfg[3].u_probe.failures + g_cfg[4].u_probe.failures + g_cfg[5].u_probe.failures
              + g_cfg[6].u_probe.failures + g_cfg[7].u_probe.failures + g_cfg[8].u_probe.failures;
    for (int c = 0; c < NCFG; c++)
      $display("RS1=%0d RS2=%0d OS1=%0d IS1=8 OS2=14: SNR %6.2f dB", cfg(c, 0), cfg(c, 1),
               cfg(c, 2), snr[c]);
    expect_less(0, 1);  // RS 9 < 10
    expect_less(1, 2);  // RS 10 < 11
    expect_less(4, 5);  // OS1 9 < 10
    expect_less(5, 2);  // OS1 10 < 11
    expect_less(7, 2);  // narrowing RS1 costs SNR
    expect_less(8, 2);  // narrowing RS2 costs SNR
    checks++;
    if (snr[2] <= 50.0) begin
      failures++;
      $display("FAIL: SNR at the chosen sizes %f dB, not above 50 dB", snr[2]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NBLK + 4) * 128 + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
