// mdct: one-dimensional N-point DCT stage (used twice: MDCT1 and MDCT2).
//
// z[k] = round(2^G * sum_m C[m][k] * x[m]) for a vector of N words x[m]
// (IW bits), given in OS bits; G follows from the widths (below), so the
// chip's output always carries the same scale, 4*Y, whatever OS1 is.  It is
// computed without multipliers: phase_a forms the butterfly sums
// and differences and serialises them, phase_b's N serial multiplier-
// accumulators turn each bit plane into table look-ups and shifted adds.
// Timing: `load` takes a new vector; then W = IW+1 clocks with `en` high
// (`first` on the first, `last` on the sign-bit clock) produce z, which
// stays valid until the next `first`.  A new vector may be loaded in the
// same clock as the result is taken, so the stage accepts one vector every
// W+1 clocks or slower.  Both stages of the chip are this one module with
// different widths, as in the original design.
module mdct
  import bdct_pkg::*;
#(
  parameter int N  = N_DEF,
  parameter int IW = IS1_DEF,
  parameter int OS = OS1_DEF,
  parameter int RS = RS_DEF,
  // Output binary point: z = round(2^G * transform).  The transform can
  // grow by up to sqrt(N), so G leaves ceil(log2(N)/2) bits of headroom
  // above the input width: G = 1 for both stages of the chip.
  parameter int G  = OS - IW - ($clog2(N) + 1) / 2
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 load,
  input  logic                 en,
  input  logic                 first,
  input  logic                 last,
  input  logic signed [IW-1:0] x [N],
  output logic signed [OS-1:0] z [N]
);

  localparam int W    = IW + 1;
  // Table binary point: the largest table word, sqrt(N)/2, must fit in RS
  // signed bits.  RS-2 fractional bits for N = 4 and 8, one less per factor
  // of 4 in N beyond that.
  localparam int FRAC = RS - 2 - ($clog2(N) - 2) / 2;

  logic [N/2-1:0] sbit, dbit;

  phase_a #(.N(N), .IW(IW)) u_phase_a (
    .clk  (clk),
    .rst  (rst),
    .load (load),
    .shift(en),
    .x    (x),
    .sbit (sbit),
    .dbit (dbit)
  );

  phase_b #(.N(N), .W(W), .RS(RS), .FRAC(FRAC), .OS(OS), .G(G)) u_phase_b (
    .clk  (clk),
    .rst  (rst),
    .en   (en),
    .first(first),
    .last (last),
    .sbit (sbit),
    .dbit (dbit),
    .z    (z)
  );

  // A load during a bit step would corrupt the serial words.
  always_ff @(posedge clk) begin
    if (!rst) a_no_load_while_busy: assert (!(load && en));
  end

endmodule
