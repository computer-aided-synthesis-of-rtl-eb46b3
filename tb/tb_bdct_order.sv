// tb_bdct_order: the engine at block orders other than 8, which its
// parametrized description allows.  Runs N = 4 (4 clocks per pixel, so
// that the 12-bit serial words of the second stage fit in a vector period
// of 16 clocks) and N = 16 (1 clock per pixel) on pseudo-random blocks,
// checks every output bit-exactly against the reference model and the
// accuracy against the exact 2-D DCT, and that both runs finish.
module tb_bdct_order;
  localparam int NBLK = 4;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  bdct_snr_probe #(.N(4),  .CPP(4), .NBLK(NBLK)) u_n4  (.clk(clk), .rst(rst));
  bdct_snr_probe #(.N(16), .CPP(1), .NBLK(NBLK)) u_n16 (.clk(clk), .rst(rst));

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (u_n4.done && u_n16.done);
    @(posedge clk);
    checks   += u_n4.checks + u_n16.checks;
    failures += u_n4.failures + u_n16.failures;
    $display("N=4: %0d outputs, SNR %6.2f dB   N=16: %0d outputs, SNR %6.2f dB",
             u_n4.checks, u_n4.snr_db, u_n16.checks, u_n16.snr_db);
    checks += 2;
    if (u_n4.checks != NBLK * 16)   failures++;
    if (u_n16.checks != NBLK * 256) failures++;
    checks += 2;
    if (u_n4.snr_db < 40.0)  failures++;
    if (u_n16.snr_db < 40.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NBLK + 20) * 256 + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
