// jpeg_encoder: baseline JPEG encoder for RGB images up to 640x480, 4:2:2.
//
// Data path, one sample per clock when the pipeline is full:
//   host pixels -> buf_fifo (two 8-line stripes) -> rgb2ycbcr (+4:2:2)
//   -> dct_2d (ROM-based row DCT, ping-pong transpose, column DCT)
//   -> zigzag (ping-pong buffer + reorder ROM) -> quantizer (64x8 RAM)
//   -> rle -> huffman -> byte_stuffer -> jfif_gen -> JPEG byte stream
// Control: host_if (registers, header fields) and jpeg_ctrl (header, scan,
// flush, EOI sequence); header_ram (2048x8) holds the JFIF header.
// Every stage hands data on with valid/ready, so a slow output (or a long
// Huffman code) stalls the chain back to the input, where fifo_full stops
// the host. An 8x8 block passes each block stage in 64 cycles.
// Use: write IMG_W / IMG_H (and optionally the quantization table), write
// CTRL = 1, stream the image line by line into pix_*, collect jpg_* bytes
// (jpg_addr is the file offset) until done.
module jpeg_encoder import jpeg_pkg::*; #(
  parameter int IMG_W_MAX = 640,
  parameter int IMG_H_MAX = 480
) (
  input  logic        clk,
  input  logic        rst_n,
  // host register bus
  input  logic        host_we,
  input  logic [7:0]  host_addr,
  input  logic [15:0] host_wdata,
  output logic [15:0] host_rdata,
  output logic        host_wait,
  // host pixel interface
  input  logic        pix_we,
  input  logic [23:0] pix_data,
  output logic        pix_ready,
  output logic        fifo_full,
  output logic        fifo_almost_full,
  output logic [15:0] pixel_count,
  // compressed output
  output logic        jpg_valid,
  input  logic        jpg_ready,
  output logic [7:0]  jpg_data,
  output logic [23:0] jpg_addr,
  // status
  output logic        busy,
  output logic        done
);

  logic        start, clr, flush, stuffer_empty, start_jfif, eoi, ready_jfif, blk_done;
  logic [15:0] img_w, img_h;
  logic        q_we, hdr_we, hdr_rd_en;
  logic [5:0]  q_addr;
  logic [7:0]  q_data, hdr_data, hdr_rd_data;
  logic [10:0] hdr_addr, hdr_rd_addr;

  logic        bf_valid, bf_ready;
  pix_pair_t   bf_pair;
  logic        cc_valid, cc_ready;
  logic signed [7:0] cc_data;
  logic        dct_valid, dct_ready;
  logic signed [COEF_W-1:0] dct_data;
  logic        zz_valid, zz_ready;
  logic signed [COEF_W-1:0] zz_data;
  logic        qz_valid, qz_ready;
  logic signed [COEF_W-1:0] qz_data;
  logic        rl_valid, rl_ready;
  rle_sym_t    rl_sym;
  logic        hf_valid, hf_ready;
  vlc_t        hf_vlc;
  logic        bs_valid, bs_ready;
  logic [7:0]  bs_data;

  host_if #(.IMG_W_MAX(IMG_W_MAX), .IMG_H_MAX(IMG_H_MAX)) u_host_if (
    .clk, .rst_n, .host_we, .host_addr, .host_wdata, .host_rdata, .host_wait,
    .busy, .done, .start, .img_w, .img_h,
    .q_we, .q_addr, .q_data, .hdr_we, .hdr_addr, .hdr_data
  );

  jpeg_ctrl u_ctrl (
    .clk, .rst_n, .start, .img_w, .img_h, .clr, .busy, .done,
    .start_jfif, .eoi, .ready_jfif, .blk_done, .flush, .stuffer_empty
  );

  buf_fifo #(.IMG_W_MAX(IMG_W_MAX)) u_buf_fifo (
    .clk, .rst_n, .clr, .enable(busy), .img_w, .img_h,
    .pix_we, .pix_data, .pix_ready, .fifo_full, .fifo_almost_full, .pixel_count,
    .out_valid(bf_valid), .out_ready(bf_ready), .out_pair(bf_pair)
  );

  rgb2ycbcr u_rgb2ycbcr (
    .clk, .rst_n, .in_valid(bf_valid), .in_ready(bf_ready), .in_pair(bf_pair),
    .out_valid(cc_valid), .out_ready(cc_ready), .out_data(cc_data)
  );

  dct_2d u_dct (
    .clk, .rst_n, .in_valid(cc_valid), .in_ready(cc_ready), .in_data(cc_data),
    .out_valid(dct_valid), .out_ready(dct_ready), .out_data(dct_data)
  );

  zigzag u_zigzag (
    .clk, .rst_n, .in_valid(dct_valid), .in_ready(dct_ready), .in_data(dct_data),
    .out_valid(zz_valid), .out_ready(zz_ready), .out_data(zz_data)
  );

  quantizer u_quant (
    .clk, .rst_n, .clr, .q_we, .q_addr, .q_data,
    .in_valid(zz_valid), .in_ready(zz_ready), .in_data(zz_data),
    .out_valid(qz_valid), .out_ready(qz_ready), .out_data(qz_data)
  );

  rle u_rle (
    .clk, .rst_n, .clr, .in_valid(qz_valid), .in_ready(qz_ready), .in_data(qz_data),
    .out_valid(rl_valid), .out_ready(rl_ready), .out_sym(rl_sym)
  );

  huffman u_huffman (
    .clk, .rst_n, .clr, .in_valid(rl_valid), .in_ready(rl_ready), .in_sym(rl_sym),
    .out_valid(hf_valid), .out_ready(hf_ready), .out_vlc(hf_vlc)
  );

  assign blk_done = hf_valid && hf_ready && hf_vlc.blk_end;

  byte_stuffer u_stuffer (
    .clk, .rst_n, .flush, .in_valid(hf_valid), .in_ready(hf_ready), .in_vlc(hf_vlc),
    .out_valid(bs_valid), .out_ready(bs_ready), .out_data(bs_data),
    .empty(stuffer_empty)
  );

  header_ram u_header_ram (
    .clk, .wr_en(hdr_we), .wr_addr(hdr_addr), .wr_data(hdr_data),
    .rd_en(hdr_rd_en), .rd_addr(hdr_rd_addr), .rd_data(hdr_rd_data)
  );

  jfif_gen u_jfif (
    .clk, .rst_n, .start_jfif, .eoi, .ready_jfif,
    .hdr_rd_en, .hdr_rd_addr, .hdr_rd_data,
    .scan_valid(bs_valid), .scan_ready(bs_ready), .scan_data(bs_data),
    .out_valid(jpg_valid), .out_ready(jpg_ready), .out_data(jpg_data), .out_addr(jpg_addr)
  );

endmodule
