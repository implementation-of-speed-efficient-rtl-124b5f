// tb_jpeg_encoder_full: the end-to-end test at the full 640x480 image size,
// followed by a 32x8 image; the encoder keeps all its default parameters.
module tb_jpeg_encoder_full;
  tb_jpeg_encoder #(.IMG_W(640), .IMG_H(480)) u_tb ();
endmodule
