// tb_buf_fifo: a 48x24 image (three 8-line stripes) written by a host that
// writes whenever it may, read with random stalls. Every read is compared
// with the block order worked out in the testbench: per 16x8 MCU, Y of the
// left and right 8x8, then Cb and Cr as pixel pairs. Checks PIXEL_COUNT,
// that fifo_full stops the host and fifo_almost_full comes first, that no
// pixel beyond the image is taken, and a second image after clr.
module tb_buf_fifo;
  import jpeg_pkg::*;
  localparam int W = 48, H = 24;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, enable = 1'b0;
  logic [15:0] img_w = 16'(W), img_h = 16'(H);
  logic pix_we = 1'b0;
  logic [23:0] pix_data = '0;
  logic pix_ready, fifo_full, fifo_almost_full;
  logic [15:0] pixel_count;
  logic out_valid, out_ready = 1'b1;
  pix_pair_t out_pair;
  buf_fifo dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0, cyc = 0, nout = 0;
  int n_full = 0, n_afull = 0;
  pix_pair_t exp_q [$];
  logic [23:0] img [H][W];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc == 50000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic one_image();
    int idx;
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) img[y][x] = 24'($urandom);
    for (int s = 0; s < H/8; s++)
      for (int m = 0; m < W/16; m++)
        for (int ph = 0; ph < 4; ph++)
          for (int r = 0; r < 8; r++)
            for (int c = 0; c < 8; c++) begin
              pix_pair_t p;
              if (ph < 2) begin
                p.comp = COMP_Y; p.pa = img[s*8+r][m*16+ph*8+c]; p.pb = p.pa;
              end else begin
                p.comp = (ph == 2) ? COMP_CB : COMP_CR;
                p.pa = img[s*8+r][m*16+2*c]; p.pb = img[s*8+r][m*16+2*c+1];
              end
              exp_q.push_back(p);
            end
    idx = 0;
    while (idx < W*H) begin
      pix_we = 1'b1; pix_data = img[idx / W][idx % W];
      chk(pixel_count == 16'(idx % W), "PIXEL_COUNT");
      if (fifo_almost_full) n_afull++;
      if (pix_ready) idx++;
      else if (fifo_full) n_full++;
      @(negedge clk);
    end
    pix_we = 1'b0;
    while (exp_q.size() != 0) @(negedge clk);
    chk(!pix_ready, "no pixel taken beyond the image");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    enable = 1'b1;
    @(negedge clk);
    one_image();
    clr = 1'b1; @(negedge clk); clr = 1'b0;
    one_image();
    chk(n_full > 0, "host stalled by fifo_full");
    chk(n_afull > 0, "fifo_almost_full raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    pix_pair_t e;
    e = exp_q.pop_front();
    checks++;
    if (out_pair != e) begin
      failures++;
      if (failures < 10) $display("FAIL read %0d: got %h expected %h", nout, out_pair, e);
    end
    nout++;
  end
endmodule
