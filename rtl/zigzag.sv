// zigzag: reorders the 64 coefficients of a block into zig-zag order.
//
// A ping-pong block buffer is written in arrival order; a reorder ROM maps
// the output position j (0..63) to the word to read. The ROM holds the
// zig-zag sequence (raster position row*8+col of the j-th coefficient);
// with IN_COL_MAJOR set (the DCT's column-major output) the raster position
// is transposed to the write index. One block enters while the previous one
// leaves, one coefficient per cycle each way (valid/ready on both sides).
// The zig-zag sequence and the reorder ROM follow the design; the
// input-order option is this implementation's.
module zigzag import jpeg_pkg::*; #(
  parameter bit IN_COL_MAJOR = 1'b1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [COEF_W-1:0] in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic signed [COEF_W-1:0] out_data
);

  logic [5:0] j, rz, addr;

  assign rz   = ZZ_RASTER[j];
  assign addr = IN_COL_MAJOR ? {rz[2:0], rz[5:3]} : rz;

  pingpong_buf #(.W(COEF_W), .ORDER(RD_LINEAR), .USE_RD_ADDR(1'b1)) u_buf (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data(in_data),
    .rd_idx(j), .rd_addr(addr),
    .out_valid, .out_ready, .out_data(out_data)
  );

endmodule
