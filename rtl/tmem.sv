// tmem: transposition memory, an N x N matrix of bidirectional shift cells.
//
// Each `shift` pushes one N-word vector in and one out.  With dir = 0
// (horizontal) every row moves one column right: din[r] enters cell
// (r, 0) and column N-1 leaves, dout[i] = M[i][N-1].  With dir = 1
// (vertical) every column moves one row up: din[N-1-c] enters cell
// (N-1, c) and row 0 leaves, dout[i] = M[0][N-1-i].  A block of N vectors
// written in one direction is read back transposed by the next N shifts in
// the other direction, which at the same time write the next block; the
// controller therefore flips `dir` every N shifts and the memory never
// idles.  Vector j read out holds element j of the N written vectors, in
// the order they were written.  dout is combinational from the matrix
// edge; a vector leaves N shifts after it entered.  The cell matrix, the
// input buffer feeding two edges and the output multiplexer follow the
// original memory; the choice of edges and the wiring order are this
// design's.
module tmem #(
  parameter int N = 8,
  parameter int W = 11
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         shift,
  input  logic         dir,
  input  logic [W-1:0] din  [N],
  output logic [W-1:0] dout [N]
);

  logic [W-1:0] mat [N][N];

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar c = 0; c < N; c++) begin : g_col
      logic [W-1:0] inp_h, inp_v;
      // Input buffer: the new vector enters on column 0 or on row N-1.
      if (c == 0) begin : g_h_edge
        assign inp_h = din[r];
      end else begin : g_h_in
        assign inp_h = mat[r][c-1];
      end
      if (r == N - 1) begin : g_v_edge
        assign inp_v = din[N-1-c];
      end else begin : g_v_in
        assign inp_v = mat[r+1][c];
      end
      tmem_bs #(.W(W)) u_bs (
        .clk  (clk),
        .rst  (rst),
        .shift(shift),
        .dir  (dir),
        .inp_h(inp_h),
        .inp_v(inp_v),
        .q    (mat[r][c])
      );
    end
  end

  // Output multiplexer: column N-1 or row 0.
  always_comb begin
    for (int i = 0; i < N; i++)
      dout[i] = dir ? mat[0][N-1-i] : mat[i][N-1];
  end

endmodule
