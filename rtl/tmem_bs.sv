// tmem_bs: bidirectional shift cell of the transposition memory.
//
// One W-bit word.  On `shift` it loads its horizontal neighbour (dir = 0)
// or its vertical neighbour (dir = 1); otherwise it holds.  In the original
// cell a horizontal or a vertical clock phase selects the input and a
// further phase drives the output stage; here those phases become one
// rising-edge register with a 2:1 select and an enable.
module tmem_bs #(
  parameter int W = 11
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         shift,
  input  logic         dir,
  input  logic [W-1:0] inp_h,
  input  logic [W-1:0] inp_v,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)        q <= '0;
    else if (shift) q <= dir ? inp_v : inp_h;
  end

endmodule
