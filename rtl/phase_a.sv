// phase_a: butterfly stage and pipeline register of one 1-D DCT stage.
//
// On `load` it captures, for m = 0..N/2-1, the sums and differences
//   s_m = x_m + x_(N-1-m),   d_m = x_m - x_(N-1-m)
// of the N input words (IW bits, two's complement), each kept exactly in
// IW+1 bits.  By the symmetry of the cosine, even-frequency coefficients
// need only the s_m and odd ones only the d_m, which halves the address
// width of every look-up table.  On each `shift` every word moves right one
// bit (arithmetic shift), so sbit/dbit present bit plane q of all words in
// the q-th clock after the load, LSB first, ending with the sign bit in
// clock IW.  The register is the stage's one-vector pipeline register.
// The butterfly follows the original design; holding the words in a
// shifting register to serialise them is this design's choice.
module phase_a
  import bdct_pkg::*;
#(
  parameter int N  = N_DEF,
  parameter int IW = IS1_DEF
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 load,
  input  logic                 shift,
  input  logic signed [IW-1:0] x [N],
  output logic [N/2-1:0]       sbit,
  output logic [N/2-1:0]       dbit
);

  logic signed [IW:0] s_q [N/2];
  logic signed [IW:0] d_q [N/2];

  always_ff @(posedge clk) begin
    for (int m = 0; m < N / 2; m++) begin
      if (rst) begin
        s_q[m] <= '0;
        d_q[m] <= '0;
      end else if (load) begin
        s_q[m] <= (IW+1)'(x[m]) + (IW+1)'(x[N-1-m]);
        d_q[m] <= (IW+1)'(x[m]) - (IW+1)'(x[N-1-m]);
      end else if (shift) begin
        s_q[m] <= s_q[m] >>> 1;
        d_q[m] <= d_q[m] >>> 1;
      end
    end
  end

  always_comb begin
    for (int m = 0; m < N / 2; m++) begin
      sbit[m] = s_q[m][0];
      dbit[m] = d_q[m][0];
    end
  end

endmodule
