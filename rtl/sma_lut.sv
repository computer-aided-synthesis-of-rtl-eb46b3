// sma_lut: the look-up table of one serial multiplier-accumulator (SMA).
//
// In distributed arithmetic a coefficient sum_m c(m,K) * w_m is built bit
// plane by bit plane: for bit q, the N/2 bits w_m[q] select which of the N/2
// coefficients are added.  This table returns that partial sum for every
// combination of the N/2 address bits:
//   val = round(2^FRAC * sum_{m : addr[m] = 1} C[m][K])
// as a signed RS-bit word.  For even K the words w_m are the butterfly sums,
// for odd K the differences, so only the first N/2 rows of C are used.
// The table is computed from the cosine formula while the design elaborates
// and is purely combinational; a synthesis tool turns it into multilevel
// logic, as the original chip did.  FRAC (binary point of the table) is this
// design's choice: RS-2 leaves room for the largest entry, sqrt(2) at N = 8.
module sma_lut
  import bdct_pkg::*;
#(
  parameter int N    = N_DEF,
  parameter int K    = 0,
  parameter int RS   = RS_DEF,
  parameter int FRAC = RS_DEF - 2
) (
  input  logic [N/2-1:0]       addr,
  output logic signed [RS-1:0] val
);

  localparam int ENTRIES = 1 << (N / 2);
  typedef logic signed [RS-1:0] word_t;

  function automatic word_t [ENTRIES-1:0] build_table();
    word_t [ENTRIES-1:0] t;
    for (int a = 0; a < ENTRIES; a++) begin
      real s;
      s = 0.0;
      for (int m = 0; m < N / 2; m++)
        if (((a >> m) & 1) == 1) s += dct_coef(N, m, K);
      t[a] = word_t'(round_real(s * (2.0 ** FRAC)));
    end
    return t;
  endfunction

  localparam word_t [ENTRIES-1:0] TABLE = build_table();

  always_comb val = TABLE[addr];

endmodule
