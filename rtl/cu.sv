// cu: control unit of the 8x8 DCT chip.
//
// Free running after reset.  The clock runs at CPP times the pixel rate, so
// one N-word vector takes a period of P = N*CPP clocks.  A clock counter
// (0..P-1) and a vector counter (0..N-1) generate everything else:
//   pix_stb   clock 0 of every pixel slot: IR samples an input pixel and a
//             new output coefficient starts
//   or_shift  last clock of every pixel slot: OR moves to the next element
//   vec_stb   last clock of the period: IR -> MDCT1, MDCT1 -> TMEM,
//             TMEM -> MDCT2 and MDCT2 -> OR all move at once
//   sX_en/first/last  bit-serial sequencing of MDCT1 (W1 bits) and MDCT2
//             (W2 bits): bit q in clock q of the period, sign bit last
//   dir       TMEM direction, flipped every N vectors, aligned with the
//             blocks as they arrive at TMEM (one period after IR)
//   in_sob    the pixel sampled now is the first of an input block
//   out_valid / out_sob  the pipeline has filled; Y[0][0] of a block
//             starts now.  A block reaches the output N+3 periods after
//             its first pixel: 1 in IR, 1 in MDCT1, N in TMEM, 1 in MDCT2.
// The document only says that the control unit regulates the three stages;
// this schedule is this design's.
module cu #(
  parameter int N   = 8,
  parameter int CPP = 2,
  parameter int W1  = 9,
  parameter int W2  = 12
) (
  input  logic clk,
  input  logic rst,
  output logic pix_stb,
  output logic or_shift,
  output logic vec_stb,
  output logic in_sob,
  output logic dir,
  output logic s1_en,
  output logic s1_first,
  output logic s1_last,
  output logic s2_en,
  output logic s2_first,
  output logic s2_last,
  output logic out_valid,
  output logic out_sob
);

  localparam int P    = N * CPP;
  localparam int LAT  = N + 3;            // periods from block input to output
  localparam int CW   = $clog2(P);
  localparam int VW   = (N > 1) ? $clog2(N) : 1;
  localparam int FW   = $clog2(LAT + 1);

  if (W1 > P - 1 || W2 > P - 1) begin : g_check
    $error("cu: a serial multiplication of W bits needs W+1 <= N*CPP clocks");
  end

  logic [CW-1:0] cyc;
  logic [VW-1:0] vec;
  logic [FW-1:0] fill;

  always_ff @(posedge clk) begin
    if (rst) begin
      cyc  <= '0;
      vec  <= '0;
      dir  <= 1'b0;
      fill <= '0;
    end else begin
      cyc <= (cyc == CW'(P - 1)) ? '0 : cyc + 1'b1;
      if (vec_stb) begin
        vec <= (vec == VW'(N - 1)) ? '0 : vec + 1'b1;
        // The shift at the end of period 0 completes a TMEM block.
        if (vec == '0) dir <= ~dir;
        if (fill != FW'(LAT)) fill <= fill + 1'b1;
      end
    end
  end

  always_comb begin
    pix_stb   = (int'(cyc) % CPP) == 0;
    or_shift  = (int'(cyc) % CPP) == CPP - 1;
    vec_stb   = cyc == CW'(P - 1);
    in_sob    = (cyc == '0) && (vec == '0);
    s1_en     = int'(cyc) < W1;
    s1_first  = cyc == '0;
    s1_last   = cyc == CW'(W1 - 1);
    s2_en     = int'(cyc) < W2;
    s2_first  = cyc == '0;
    s2_last   = cyc == CW'(W2 - 1);
    out_valid = fill == FW'(LAT);
    out_sob   = out_valid && (cyc == '0) && (vec == VW'(LAT % N));
  end

endmodule
