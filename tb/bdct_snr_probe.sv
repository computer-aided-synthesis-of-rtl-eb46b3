// bdct_snr_probe: runs one configuration of the DCT chip for the word-size
// and block-order sweeps.  Instantiates bdct_top with the given order N,
// clocks per pixel, table widths (RS1, RS2) and intermediate width (OS1),
// feeds it NBLK pseudo-random blocks of 8-bit
// pixels (the same sequence for every configuration: fixed-seed xorshift),
// and for every output coefficient
//   - compares it with the bit-exact reference of the two stages, and
//   - accumulates signal and error power against the exact real 2-D DCT
//     (the output is 2^(G1+G2) * Y, G the binary point of each stage).
// When done it sets `done`; snr_db, checks and failures are read by the
// enclosing testbench.
module bdct_snr_probe
  import bdct_ref_pkg::*;
#(
  parameter int N    = 8,
  parameter int CPP  = 2,
  parameter int RS1  = 11,
  parameter int RS2  = 11,
  parameter int OS1  = 11,
  parameter int NBLK = 6
) (
  input logic clk,
  input logic rst
);
  localparam int IS1 = 8, OS2 = 14;
  localparam int HEAD = ($clog2(N) + 1) / 2;  // growth headroom of one stage
  localparam int G1 = OS1 - IS1 - HEAD, G2 = OS2 - OS1 - HEAD;

  logic signed [IS1-1:0] pix_in;
  logic pix_stb, in_sob, y_stb, y_sob, y_valid;
  logic signed [OS2-1:0] y_out;

  bdct_top #(.N(N), .CPP(CPP), .RS1(RS1), .RS2(RS2), .OS1(OS1)) dut (.*);

  int  checks = 0, failures = 0;
  bit  done = 1'b0;
  real snr_db = 0.0;

  longint xblk [NBLK][N][N];
  longint yexp [NBLK][N][N];
  real    yreal [NBLK][N][N];

  initial begin
    logic [31:0] st;
    st = 32'h1234_5678;
    for (int b = 0; b < NBLK; b++)
      for (int n = 0; n < N; n++)
        for (int m = 0; m < N; m++) begin
          st ^= st << 13; st ^= st >> 17; st ^= st << 5;
          xblk[b][m][n] = longint'($signed(st[7:0]));
        end
    for (int b = 0; b < NBLK; b++) begin
      vec_t zrow [N];
      for (int i = 0; i < N; i++) begin
        vec_t col;
        for (int m = 0; m < 16; m++) col[m] = (m < N) ? xblk[b][m][i] : 0;
        zrow[i] = mdct_ref(N, IS1, OS1, RS1, G1, col);
      end
      for (int j = 0; j < N; j++) begin
        vec_t zc, yr;
        for (int i = 0; i < 16; i++) zc[i] = (i < N) ? zrow[i][j] : 0;
        yr = mdct_ref(N, OS1, OS2, RS2, G2, zc);
        for (int l = 0; l < N; l++) yexp[b][j][l] = yr[l];
      end
      for (int k = 0; k < N; k++)
        for (int l = 0; l < N; l++) begin
          real acc;
          acc = 0.0;
          for (int m = 0; m < N; m++)
            for (int n = 0; n < N; n++)
              acc += coef(N, m, k) * real'(xblk[b][m][n]) * coef(N, n, l);
          yreal[b][k][l] = acc;
        end
    end
  end

  int in_blk = 0, in_idx = 0;
  assign pix_in = (in_blk < NBLK) ? IS1'(xblk[in_blk][in_idx % N][in_idx / N]) : '0;
  always @(posedge clk) begin
    if (!rst && pix_stb && in_blk < NBLK) begin
      if (in_idx == N * N - 1) begin
        in_idx <= 0;
        in_blk <= in_blk + 1;
      end else in_idx <= in_idx + 1;
    end
  end

  int out_blk = -1, out_idx = 0;
  real err2 = 0.0, sig2 = 0.0;
  always @(posedge clk) begin
    if (!rst && y_stb && !done) begin
      if (y_sob) begin
        out_blk++;
        out_idx = 0;
      end
      if (out_blk >= 0 && out_blk < NBLK) begin
        int k, l;
        real e;
        k = out_idx / N;
        l = out_idx % N;
        checks++;
        if (longint'(y_out) != yexp[out_blk][k][l]) begin
          failures++;
          if (failures < 5)
            $display("FAIL: RS1=%0d RS2=%0d OS1=%0d block %0d Y[%0d][%0d] = %0d expected %0d",
                     RS1, RS2, OS1, out_blk, k, l, y_out, yexp[out_blk][k][l]);
        end
        e = real'(y_out) / (2.0 ** (G1 + G2)) - yreal[out_blk][k][l];
        err2 += e * e;
        sig2 += yreal[out_blk][k][l] ** 2;
        out_idx++;
        if (out_idx == N * N && out_blk == NBLK - 1) begin
          snr_db = 10.0 * $log10(sig2 / err2);
          done = 1'b1;
        end
      end
    end
  end

endmodule
