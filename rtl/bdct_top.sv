// bdct_top: 8x8 two-dimensional discrete cosine transform chip.
//
// Computes Y = C^T X C for every 8x8 block X of 2's-complement pixels, as
// two one-dimensional transforms with a transposition in between:
//   pix_in -> IR -> MDCT1 -> TMEM -> MDCT2 -> OR -> y_out
// IR gathers one input column, MDCT1 transforms it into one row of
// Z = X^T C, TMEM stores N such rows and hands them back as columns, MDCT2
// transforms each into one row of Y, and OR sends its N coefficients out
// one by one.  No multipliers: each MDCT is a butterfly plus N bit-serial
// look-up-table accumulators (distributed arithmetic).  Everything runs at
// one pixel per CPP clocks with no gaps between blocks; the control unit
// sequences all stages.
//
// Interface (clock at CPP x pixel rate, synchronous active-high reset):
//   pix_in   sampled when pix_stb = 1; blocks enter column by column,
//            x[0][0], x[1][0], .., x[N-1][0], x[0][1], ..; in_sob marks
//            x[0][0].  The source follows the chip's timing (no stall).
//   y_out    4*Y, i.e. two fractional bits, row by row: Y[0][0], Y[0][1],
//            ..; each coefficient lasts CPP clocks and starts with y_stb;
//            y_sob marks Y[0][0]; y_valid rises once the pipeline is full.
// Timing: row 0 of Y is complete 10 vector periods (N*CPP clocks each)
// after column 0 of X has entered: one period in MDCT1, N = 8 in TMEM and
// one in MDCT2.  It leaves through OR in the period after that, so Y[0][0]
// starts (N+3)*N*CPP = 176 clocks after x[0][0] was sampled.
// Word sizes follow the chip (8-bit pixels, 11-bit intermediate words,
// 14-bit outputs, 11-bit tables, 27 MHz clock for 13.5 MHz pixels); the
// binary points, the interface strobes and reset are this design's.
module bdct_top
  import bdct_pkg::*;
#(
  parameter int N   = N_DEF,
  parameter int IS1 = IS1_DEF,
  parameter int OS1 = OS1_DEF,
  parameter int OS2 = OS2_DEF,
  parameter int RS1 = RS_DEF,
  parameter int RS2 = RS_DEF,
  parameter int CPP = CPP_DEF
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic signed [IS1-1:0] pix_in,
  output logic                  pix_stb,
  output logic                  in_sob,
  output logic signed [OS2-1:0] y_out,
  output logic                  y_stb,
  output logic                  y_sob,
  output logic                  y_valid
);

  localparam int IS2 = OS1;  // MDCT2 input = TMEM word = MDCT1 output

  logic or_shift, vec_stb, dir;
  logic s1_en, s1_first, s1_last, s2_en, s2_first, s2_last;
  logic out_valid, out_sob;

  cu #(.N(N), .CPP(CPP), .W1(IS1 + 1), .W2(IS2 + 1)) u_cu (
    .clk      (clk),
    .rst      (rst),
    .pix_stb  (pix_stb),
    .or_shift (or_shift),
    .vec_stb  (vec_stb),
    .in_sob   (in_sob),
    .dir      (dir),
    .s1_en    (s1_en),
    .s1_first (s1_first),
    .s1_last  (s1_last),
    .s2_en    (s2_en),
    .s2_first (s2_first),
    .s2_last  (s2_last),
    .out_valid(out_valid),
    .out_sob  (out_sob)
  );

  // Stage 1: input register and first 1-D transform.
  logic signed [IS1-1:0] x_vec [N];
  logic signed [IS1-1:0] x_next [N];
  logic signed [OS1-1:0] z_vec [N];

  ir_sipo #(.N(N), .IW(IS1)) u_ir (
    .clk     (clk),
    .rst     (rst),
    .shift   (pix_stb),
    .din     (pix_in),
    .vec     (x_vec),
    .vec_next(x_next)
  );

  mdct #(.N(N), .IW(IS1), .OS(OS1), .RS(RS1)) u_mdct1 (
    .clk  (clk),
    .rst  (rst),
    .load (vec_stb),
    .en   (s1_en),
    .first(s1_first),
    .last (s1_last),
    .x    (x_next),
    .z    (z_vec)
  );

  // Stage 2: transposition memory.
  logic [OS1-1:0] t_in  [N];
  logic [OS1-1:0] t_out [N];
  logic signed [IS2-1:0] zt_vec [N];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      t_in[i]   = z_vec[i];
      zt_vec[i] = signed'(t_out[i]);
    end
  end

  tmem #(.N(N), .W(OS1)) u_tmem (
    .clk  (clk),
    .rst  (rst),
    .shift(vec_stb),
    .dir  (dir),
    .din  (t_in),
    .dout (t_out)
  );

  // Stage 3: second 1-D transform and output register.
  logic signed [OS2-1:0] y_vec [N];

  mdct #(.N(N), .IW(IS2), .OS(OS2), .RS(RS2)) u_mdct2 (
    .clk  (clk),
    .rst  (rst),
    .load (vec_stb),
    .en   (s2_en),
    .first(s2_first),
    .last (s2_last),
    .x    (zt_vec),
    .z    (y_vec)
  );

  or_piso #(.N(N), .OW(OS2)) u_or (
    .clk  (clk),
    .rst  (rst),
    .load (vec_stb),
    .shift(or_shift),
    .din  (y_vec),
    .dout (y_out)
  );

  assign y_stb   = pix_stb && out_valid;
  assign y_sob   = out_sob;
  assign y_valid = out_valid;

endmodule
