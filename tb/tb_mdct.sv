// tb_mdct: runs the 1-D DCT stage in both of the chip's configurations
// (8-bit in / 11-bit out, and 11-bit in / 14-bit out) on random and
// extreme vectors with the chip's schedule: load, then W = IW+1 bit steps,
// result taken W+1 clocks after the load.  Compares all N outputs with
// the bit-exact reference and with the real DCT within the error bound
// of the 11-bit tables (0.5 LSB of table per bit plane: 1.5 and 8.5).
module tb_mdct;
  import bdct_ref_pkg::*;
  localparam int N = 8, RS = 11;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, load = 0, en = 0, first = 0, last = 0;
  logic signed [7:0]  x1 [N];
  logic signed [10:0] z1 [N];
  logic signed [10:0] x2 [N];
  logic signed [13:0] z2 [N];

  mdct #(.N(N), .IW(8),  .OS(11), .RS(RS), .G(1)) dut1 (.clk, .rst, .load, .en, .first, .last, .x(x1), .z(z1));
  mdct #(.N(N), .IW(11), .OS(14), .RS(RS), .G(1)) dut2 (.clk, .rst, .load, .en, .first, .last, .x(x2), .z(z2));
  always #5 clk = ~clk;

  // One operation on one stage; the other stage is also stepped but its
  // result is not looked at in that pass.
  task automatic run(input int stage, input vec_t v);
    int w;
    vec_t e;
    rvec_t r;
    w = (stage == 1) ? 9 : 12;
    for (int m = 0; m < N; m++) begin
      if (stage == 1) x1[m] = 8'(v[m]);
      else            x2[m] = 11'(v[m]);
    end
    @(negedge clk);
    load = 1;
    @(negedge clk);
    load = 0;
    for (int q = 0; q < w; q++) begin
      en = 1; first = (q == 0); last = (q == w - 1);
      @(negedge clk);
    end
    en = 0; first = 0; last = 0;
    e = (stage == 1) ? mdct_ref(N, 8, 11, RS, 1, v) : mdct_ref(N, 11, 14, RS, 1, v);
    r = dct_real(N, 1, v);
    for (int k = 0; k < N; k++) begin
      longint got;
      got = (stage == 1) ? longint'(z1[k]) : longint'(z2[k]);
      checks += 2;
      if (got != e[k]) begin
        failures++;
        $display("FAIL: stage %0d z[%0d] = %0d expected %0d", stage, k, got, e[k]);
      end
      if (rabs(real'(got) - r[k]) > ((stage == 1) ? 1.5 : 8.5)) begin
        failures++;
        $display("FAIL: stage %0d z[%0d] = %0d, real %f", stage, k, got, r[k]);
      end
    end
  endtask

  initial begin
    vec_t v;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 150; t++) begin
      for (int m = 0; m < 16; m++) v[m] = (m >= N) ? 0 :
        (t == 0) ? -128 : (t == 1) ? 127 : (t == 2) ? ((m % 2 != 0) ? 127 : -128) : longint'($signed(8'($urandom)));
      run(1, v);
      for (int m = 0; m < 16; m++) v[m] = (m >= N) ? 0 :
        (t == 0) ? -1024 : (t == 1) ? 1023 : (t == 2) ? ((m % 2 != 0) ? 1023 : -1024) : longint'($signed(11'($urandom)));
      run(2, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
