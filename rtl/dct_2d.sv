// dct_2d: 8x8 two-dimensional forward DCT, one sample per cycle.
//
// F(u,v) = 1/4 C(u)C(v) sum_x sum_y f(x,y) cos((2x+1)u*pi/16) cos((2y+1)v*pi/16)
// computed separably: a row DCT (dct_1d, 8-bit level-shifted input, 13-bit
// output with two fractional bits), a ping-pong transpose memory (the
// block buffer between the passes) and a column DCT (12-bit integer output).
// Input: one block in raster order (row by row). Output: the 64
// coefficients in column-major order, index v*8+u, which the zig-zag unit
// takes into account. With the pipeline full a block is processed every
// 64 cycles; the latency of one block is about 140 cycles.
// The ROM-based DCT with a ping-pong buffer follows the design; the
// row/column split and the intermediate precision are this implementation's.
module dct_2d import jpeg_pkg::*; (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [7:0]        in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic signed [COEF_W-1:0] out_data
);

  logic              r_valid, r_ready;
  logic signed [12:0] r_data;
  logic              t_valid, t_ready;
  logic [12:0]       t_data;
  logic [5:0]        t_idx;

  dct_1d #(.IN_W(8), .OUT_W(13), .SHIFT(COS_FRAC - 2)) u_row (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .out_valid(r_valid), .out_ready(r_ready), .out_data(r_data)
  );

  pingpong_buf #(.W(13), .ORDER(RD_TRANSPOSE)) u_transpose (
    .clk, .rst_n,
    .in_valid(r_valid), .in_ready(r_ready), .in_data(r_data),
    .rd_idx(t_idx), .rd_addr(t_idx),
    .out_valid(t_valid), .out_ready(t_ready), .out_data(t_data)
  );

  dct_1d #(.IN_W(13), .OUT_W(COEF_W), .SHIFT(COS_FRAC + 2)) u_col (
    .clk, .rst_n,
    .in_valid(t_valid), .in_ready(t_ready), .in_data(t_data),
    .out_valid, .out_ready, .out_data
  );

endmodule
