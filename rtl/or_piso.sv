// or_piso: output register OR, parallel-in serial-out.
//
// On `load` it takes a whole vector; dout shows element 0 and each `shift`
// advances to the next element (element k after k shifts).  A load in the
// same clock as a shift wins, so a new vector can follow the last element
// of the previous one without a gap.  The original design names this
// register but does not describe it; this is the simplest one that does
// the job.
module or_piso #(
  parameter int N  = 8,
  parameter int OW = 14
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 load,
  input  logic                 shift,
  input  logic signed [OW-1:0] din [N],
  output logic signed [OW-1:0] dout
);

  logic signed [OW-1:0] q [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) q[i] <= '0;
    end else if (load) begin
      q <= din;
    end else if (shift) begin
      for (int i = 0; i < N - 1; i++) q[i] <= q[i+1];
      q[N-1] <= '0;
    end
  end

  assign dout = q[0];

endmodule
