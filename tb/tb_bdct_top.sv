// tb_bdct_top: end-to-end test of the 8x8 DCT chip at its default sizes.
//
// Streams NBLK blocks of pixels back to back (random blocks, plus all-max,
// all-min and a checkerboard that push the arithmetic to its extremes),
// following the chip's pix_stb / in_sob timing, and compares every output
// coefficient with a bit-exact reference of the two 1-D stages and the
// transposition (bdct_ref_pkg), and with the exact real 2-D DCT within a
// tolerance.  Also checks: the latency from x[0][0] in to Y[0][0] out,
// (N+3)*N*CPP clocks; that outputs follow without gaps; that the
// transposition memory was read in both directions and that both stages
// saw the sign-bit (subtract) step; the overall signal-to-noise ratio.
module tb_bdct_top;
  import bdct_ref_pkg::*;

  localparam int N    = 8;
  localparam int IS1  = 8;
  localparam int OS1  = 11;
  localparam int OS2  = 14;
  localparam int RS   = 11;
  localparam int CPP  = 2;
  localparam int P    = N * CPP;
  localparam int NBLK = 12;
  localparam int LAT  = (N + 3) * P;

  logic clk = 1'b0, rst = 1'b1;
  logic signed [IS1-1:0] pix_in;
  logic pix_stb, in_sob, y_stb, y_sob, y_valid;
  logic signed [OS2-1:0] y_out;

  bdct_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint xblk [NBLK][N][N];   // [block][row m][column n]
  longint yexp [NBLK][N][N];   // [block][row k][column l], 4*Y bit-exact
  real    yreal [NBLK][N][N];  // 4*Y exact

  function automatic void make_blocks();
    for (int b = 0; b < NBLK; b++)
      for (int m = 0; m < N; m++)
        for (int n = 0; n < N; n++) begin
          case (b)
            1:       xblk[b][m][n] = 127;
            2:       xblk[b][m][n] = -128;
            3:       xblk[b][m][n] = ((m + n) % 2 == 0) ? 127 : -128;
            default: xblk[b][m][n] = longint'($signed(8'($urandom)));
          endcase
        end
  endfunction

  function automatic void make_expected();
    for (int b = 0; b < NBLK; b++) begin
      vec_t zrow [N];
      // Stage 1: column i of X -> row i of Z (2*Z, OS1 bits).
      for (int i = 0; i < N; i++) begin
        vec_t col;
        for (int m = 0; m < 16; m++) col[m] = (m < N) ? xblk[b][m][i] : 0;
        zrow[i] = mdct_ref(N, IS1, OS1, RS, 1, col);
      end
      // Stage 2: column j of Z -> row j of Y (4*Y, OS2 bits).
      for (int j = 0; j < N; j++) begin
        vec_t zc, yr;
        for (int i = 0; i < 16; i++) zc[i] = (i < N) ? zrow[i][j] : 0;
        yr = mdct_ref(N, OS1, OS2, RS, 1, zc);
        for (int l = 0; l < N; l++) yexp[b][j][l] = yr[l];
      end
      for (int k = 0; k < N; k++)
        for (int l = 0; l < N; l++) begin
          real acc;
          acc = 0.0;
          for (int m = 0; m < N; m++)
            for (int n = 0; n < N; n++)
              acc += coef(N, m, k) * real'(xblk[b][m][n]) * coef(N, n, l);
          yreal[b][k][l] = 4.0 * acc;
        end
    end
  endfunction

  // Input side: feed column by column on pix_stb.
  int in_blk = 0, in_idx = 0;
  longint sob_in_cyc [NBLK];
  always_comb begin
    int b, i;
    b = (in_blk < NBLK) ? in_blk : 0;
    i = in_idx;
    pix_in = (in_blk < NBLK) ? IS1'(xblk[b][i % N][i / N]) : '0;
  end
  always @(posedge clk) begin
    if (!rst && pix_stb) begin
      if (in_sob && in_idx != 0) begin
        failures++;
        $display("FAIL: in_sob at pixel %0d of a block", in_idx);
      end
      if (in_idx == 0 && in_blk < NBLK) begin
        checks++;
        if (!in_sob) begin
          failures++;
          $display("FAIL: in_sob missing at block start");
        end
        sob_in_cyc[in_blk] = cyc;
      end
      if (in_idx == N * N - 1) begin
        in_idx <= 0;
        in_blk <= in_blk + 1;
      end else in_idx <= in_idx + 1;
    end
  end

  // Output side.
  int out_blk = -1, out_idx = 0, stb_count = 0, gap_fail = 0;
  real err2 = 0.0, sig2 = 0.0, max_err = 0.0;
  bit done = 1'b0;
  always @(posedge clk) begin
    if (!rst && y_stb && y_valid && !done) begin
      if (y_sob) begin
        out_blk++;
        out_idx = 0;
        checks++;
        if (out_blk < NBLK && cyc - sob_in_cyc[out_blk] != longint'(LAT)) begin
          failures++;
          $display("FAIL: block %0d latency %0d clocks, expected %0d", out_blk,
                   cyc - sob_in_cyc[out_blk], LAT);
        end
      end
      if (out_blk >= 0 && out_blk < NBLK) begin
        int k, l;
        real e;
        k = out_idx / N;
        l = out_idx % N;
        checks++;
        if (longint'(y_out) != yexp[out_blk][k][l]) begin
          failures++;
          if (failures < 20)
            $display("FAIL: block %0d Y[%0d][%0d] = %0d, expected %0d", out_blk, k, l,
                     y_out, yexp[out_blk][k][l]);
        end
        e = real'(y_out) / 4.0 - yreal[out_blk][k][l] / 4.0;
        if (e < 0) e = -e;
        if (e > max_err) max_err = e;
        err2 += e * e;
        sig2 += (yreal[out_blk][k][l] / 4.0) ** 2;
        checks++;
        if (e > 6.0) begin
          failures++;
          $display("FAIL: block %0d Y[%0d][%0d] error %f against the real DCT", out_blk, k, l, e);
        end
        out_idx++;
        if (out_idx == N * N && out_blk == NBLK - 1) done = 1'b1;
      end
    end
  end

  // Output strobes must come every CPP clocks once valid.
  longint last_stb = -1;
  always @(posedge clk) begin
    if (!rst && y_stb) begin
      if (last_stb >= 0 && cyc - last_stb != longint'(CPP)) gap_fail++;
      last_stb = cyc;
      stb_count++;
    end
  end

  // Mechanism counters: TMEM read in each direction, sign-bit steps.
  int dir_h_blocks = 0, dir_v_blocks = 0, sub1 = 0, sub2 = 0;
  logic dir_d = 1'b0;
  always @(posedge clk) begin
    if (!rst) begin
      if (dut.u_tmem.dir != dir_d) begin
        if (dut.u_tmem.dir) dir_v_blocks++;
        else                dir_h_blocks++;
      end
      dir_d <= dut.u_tmem.dir;
      if (dut.u_cu.s1_last) sub1++;
      if (dut.u_cu.s2_last) sub2++;
    end
  end

  initial begin
    make_blocks();
    make_expected();
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    wait (done);
    repeat (2) @(posedge clk);
    checks++;
    if (gap_fail != 0) begin
      failures++;
      $display("FAIL: %0d irregular output strobes", gap_fail);
    end
    checks++;
    if (dir_h_blocks == 0 || dir_v_blocks == 0) begin
      failures++;
      $display("FAIL: TMEM direction switches H->V %0d, V->H %0d", dir_v_blocks, dir_h_blocks);
    end
    checks++;
    if (sub1 == 0 || sub2 == 0) begin
      failures++;
      $display("FAIL: sign-bit steps never happened");
    end
    checks++;
    if (10.0 * $log10(sig2 / err2) < 50.0) begin
      failures++;
      $display("FAIL: SNR too low");
    end
    $display("blocks=%0d  TMEM switches to V=%0d to H=%0d  sign steps %0d/%0d  max|err|=%f  SNR=%f dB",
             NBLK, dir_v_blocks, dir_h_blocks, sub1, sub2, max_err, 10.0 * $log10(sig2 / err2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat ((NBLK + 4) * N * P + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
