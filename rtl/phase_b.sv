// phase_b: the N serial multiplier-accumulators of one 1-D DCT stage.
//
// SMAs 0..N/2-1 read the butterfly sums and compute the even frequencies
// 0, 2, .., N-2; SMAs N/2..N-1 read the differences and compute the odd
// frequencies 1, 3, .., N-1.  All N run in lock step on the same
// en/first/last sequence and finish together after W clocks.  The output
// vector z is in frequency order: z[k] is coefficient k.  The split of the
// eight SMAs between sums and differences is the original design's; the
// reordering into frequency order is this design's.
module phase_b
  import bdct_pkg::*;
#(
  parameter int N    = N_DEF,
  parameter int W    = IS1_DEF + 1,
  parameter int RS   = RS_DEF,
  parameter int FRAC = RS_DEF - 2,
  parameter int OS   = OS1_DEF,
  parameter int G    = 1
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 en,
  input  logic                 first,
  input  logic                 last,
  input  logic [N/2-1:0]       sbit,
  input  logic [N/2-1:0]       dbit,
  output logic signed [OS-1:0] z [N]
);

  for (genvar j = 0; j < N; j++) begin : g_sma
    localparam bit ODD = (j >= N / 2);
    localparam int K   = ODD ? 2 * (j - N / 2) + 1 : 2 * j;
    sma #(.N(N), .K(K), .W(W), .RS(RS), .FRAC(FRAC), .OS(OS), .G(G)) u_sma (
      .clk   (clk),
      .rst   (rst),
      .en    (en),
      .first (first),
      .last  (last),
      .bits  (ODD ? dbit : sbit),
      .result(z[K])
    );
  end

endmodule
