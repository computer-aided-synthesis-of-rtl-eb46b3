// ir_sipo: input register IR, serial-in parallel-out.
//
// A chain of N words IR0..IR(N-1).  On `shift` the pixel on din enters IR0
// and every word moves one place down the chain, so after N shifts IR(N-1)
// holds the oldest pixel.  vec presents the chain in arrival order:
// vec[m] = IR(N-1-m) is the m-th of the last N pixels.  vec_next is the
// same view of what the chain will hold after this clock, including a
// pixel being shifted in now; the next stage loads from it, so at one
// clock per pixel the last pixel of a vector can be taken in the same clock
// as it arrives.  No handshake; the controller decides when to shift and
// when to read.  The shift chain is the original input register; the
// look-ahead output and the reset are this design's.
module ir_sipo #(
  parameter int N  = 8,
  parameter int IW = 8
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 shift,
  input  logic signed [IW-1:0] din,
  output logic signed [IW-1:0] vec      [N],
  output logic signed [IW-1:0] vec_next [N]
);

  logic signed [IW-1:0] ir [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) ir[i] <= '0;
    end else if (shift) begin
      ir[0] <= din;
      for (int i = 1; i < N; i++) ir[i] <= ir[i-1];
    end
  end

  always_comb begin
    for (int m = 0; m < N; m++) begin
      vec[m]      = ir[N-1-m];
      vec_next[m] = !shift ? ir[N-1-m] : (m == N - 1) ? din : ir[N-2-m];
    end
  end

endmodule
