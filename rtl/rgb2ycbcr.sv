// rgb2ycbcr: colour conversion with 4:2:2 chroma sub-sampling.
//
//   Y  =  0.299 R + 0.587 G + 0.114 B
//   Cb = -0.1687 R - 0.3313 G + 0.5 B + 128
//   Cr =  0.5 R - 0.4187 G - 0.0813 B + 128
// with the coefficients in 16-bit fixed point (sums exactly 1 or 0).
// Each input is a pix_pair_t. For COMP_Y the luminance of pixel a is
// produced; for COMP_CB / COMP_CR the chrominance of the average of pixels
// a and b (horizontal 2:1 sub-sampling = 4:2:2). The component sums are
// formed on R,G,B totals of two pixels (a counted twice for Y) and divided
// by 2^17 with rounding, clamped to 0..255, then shifted by -128 to the
// signed range the DCT expects. Two pipeline stages, one sample per cycle,
// valid/ready with a stall of the whole pipeline.
// The equations and 4:2:2 follow the design; the fixed-point form,
// averaging as the sub-sampling filter and the level shift placement are
// this implementation's.
module rgb2ycbcr import jpeg_pkg::*; (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  pix_pair_t        in_pair,
  output logic             out_valid,
  input  logic             out_ready,
  output logic signed [7:0] out_data
);

  logic        en;
  logic [8:0]  sr, sg, sb;
  logic signed [17:0] kr, kg, kb;
  logic signed [31:0] off;

  logic        v1;
  logic signed [31:0] pr, pg, pb, o1;

  assign en       = !out_valid || out_ready;
  assign in_ready = en;

  always_comb begin
    if (in_pair.comp == COMP_Y) begin
      sr = {in_pair.pa[23:16], 1'b0};
      sg = {in_pair.pa[15:8],  1'b0};
      sb = {in_pair.pa[7:0],   1'b0};
    end else begin
      sr = 9'(in_pair.pa[23:16]) + 9'(in_pair.pb[23:16]);
      sg = 9'(in_pair.pa[15:8])  + 9'(in_pair.pb[15:8]);
      sb = 9'(in_pair.pa[7:0])   + 9'(in_pair.pb[7:0]);
    end
    case (in_pair.comp)
      COMP_CB: begin kr = -18'sd11056; kg = -18'sd21712; kb = 18'sd32768;  off = 32'sd1 <<< 24; end
      COMP_CR: begin kr = 18'sd32768;  kg = -18'sd27440; kb = -18'sd5328;  off = 32'sd1 <<< 24; end
      default: begin kr = 18'sd19595;  kg = 18'sd38470;  kb = 18'sd7471;   off = 32'sd0;        end
    endcase
  end

  logic signed [31:0] sum;
  logic signed [31:0] val;
  assign sum = pr + pg + pb + o1 + 32'sd65536;
  assign val = sum >>> 17;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; pr <= '0; pg <= '0; pb <= '0; o1 <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (en) begin
      v1 <= in_valid;
      pr <= kr * $signed({1'b0, sr});
      pg <= kg * $signed({1'b0, sg});
      pb <= kb * $signed({1'b0, sb});
      o1 <= off;
      out_valid <= v1;
      if (val > 32'sd255)    out_data <= 8'sd127;
      else if (val < 32'sd0) out_data <= -8'sd128;
      else                   out_data <= 8'(val - 32'sd128);
    end
  end

endmodule
