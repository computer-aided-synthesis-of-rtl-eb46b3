// sma: serial multiplier and accumulator, one per output coefficient.
//
// Computes one DCT coefficient z_K = sum_m C[m][K] * w_m by distributed
// arithmetic.  The N/2 words w_m (butterfly sums or differences, W bits,
// two's complement) arrive bit-serially, LSB first, one bit plane per clock
// on `bits`.  Each clock the plane addresses the look-up table, the table
// word is added to the accumulator (subtracted for the sign plane, `last`)
// and the accumulator is shifted right one place:
//   P <= (P +/- (LUT << W)) >>> 1
// After W clocks P = sum_q (+/-) LUT(q) * 2^q exactly, because the bits that
// leave the adder are kept in the low W bits of P instead of being dropped.
// The result is then rounded once, to nearest (halves up), to OS bits with
// G extra fractional bits and saturated:
//   result = sat_OS( (P + 2^(SH-1)) >>> SH ),  SH = FRAC - G.
// `first` marks the LSB clock and restarts the accumulation; `result` holds
// its value until the next `first`.  The table, the adder/subtractor and the
// shifter are the structure of the original SMA; keeping the shifted-out
// bits (instead of an OS+1-bit adder), the single final rounding and the
// saturation are this design's choices.
module sma
  import bdct_pkg::*;
#(
  parameter int N    = N_DEF,
  parameter int K    = 0,
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
  input  logic [N/2-1:0]       bits,
  output logic signed [OS-1:0] result
);

  localparam int AW = RS + 2 + W;  // adder (RS+2) plus the bits shifted below it
  localparam int SH = FRAC - G;    // bits dropped by the final rounding

  logic signed [RS-1:0] lut_val;
  logic signed [AW-1:0] acc_q, acc_base, addend, acc_sum;

  sma_lut #(.N(N), .K(K), .RS(RS), .FRAC(FRAC)) u_lut (
    .addr(bits),
    .val (lut_val)
  );

  always_comb begin
    acc_base = first ? '0 : acc_q;
    addend   = AW'(lut_val) <<< W;
    acc_sum  = last ? acc_base - addend : acc_base + addend;
  end

  always_ff @(posedge clk) begin
    if (rst)     acc_q <= '0;
    else if (en) acc_q <= acc_sum >>> 1;
  end

  // Final rounding and saturation.
  localparam logic signed [AW-1:0] MAX_OUT = AW'((longint'(1) << (OS - 1)) - 1);
  localparam logic signed [AW-1:0] MIN_OUT = -AW'(longint'(1) << (OS - 1));
  logic signed [AW-1:0] rounded;

  always_comb begin
    rounded = (acc_q + (AW'(1) <<< (SH - 1))) >>> SH;
    if (rounded > MAX_OUT)      result = MAX_OUT[OS-1:0];
    else if (rounded < MIN_OUT) result = MIN_OUT[OS-1:0];
    else                        result = rounded[OS-1:0];
  end

endmodule
