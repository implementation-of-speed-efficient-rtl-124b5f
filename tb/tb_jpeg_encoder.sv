// tb_jpeg_encoder: end-to-end test of the JPEG encoder.
//
// Encodes two images one after the other (IMG_W x IMG_H, then 32x8 with a
// different quantization table, which exercises the restart of the DC
// predictors) and compares every output byte, header, entropy-coded scan
// and EOI, with the reference model of jpeg_ref_pkg. The images mix random
// noise (long codes, 0xFF bytes that need stuffing), a gradient and a
// checkerboard (a lone highest-frequency coefficient: ZRL codes). The
// output is throttled at random so the stall path runs back to the host,
// which must then see fifo_full. Each mechanism is counted and must occur.
// IMG_W / IMG_H set the test image, not the encoder (which keeps its
// defaults); tb_jpeg_encoder_full runs it at 640x480.
module tb_jpeg_encoder import jpeg_pkg::*; import jpeg_ref_pkg::*; #(
  parameter int IMG_W = 48,
  parameter int IMG_H = 32
);

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        host_we = 1'b0;
  logic [7:0]  host_addr = '0;
  logic [15:0] host_wdata = '0;
  logic [15:0] host_rdata;
  logic        host_wait;
  logic        pix_we = 1'b0;
  logic [23:0] pix_data = '0;
  logic        pix_ready, fifo_full, fifo_almost_full;
  logic [15:0] pixel_count;
  logic        jpg_valid, jpg_ready = 1'b0;
  logic [7:0]  jpg_data;
  logic [23:0] jpg_addr;
  logic        busy, done;

  jpeg_encoder dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int n_full = 0, n_afull = 0, n_backpr = 0, n_stuff = 0, n_zrl = 0, n_eob = 0;
  int n_hdr = 0, n_eoi = 0, n_qprog = 0, n_pcount = 0;
  // ping-pong overlap: a write into one bank while the other holds a block
  int n_pp_line = 0, n_pp_tr = 0, n_pp_zz = 0, n_pp_rle = 0, n_pp_huf = 0;
  int cycles = 0;
  localparam int WATCHDOG = IMG_W * IMG_H * 40 + 400000;

  always @(posedge clk) begin
    cycles <= cycles + 1;
    if (cycles == WATCHDOG) begin
      failures++;
      $display("watchdog expired: %0d bytes out, ctrl state %0d, blocks %0d", got.size(), dut.u_ctrl.st, dut.u_ctrl.blocks);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic host_write(logic [7:0] a, logic [15:0] d);
    @(negedge clk);
    while (host_wait) @(negedge clk);
    host_we = 1'b1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  // output collector with random back-pressure
  bq_t got;
  bit  collect = 1'b0;
  always @(posedge clk) begin
    if (collect && jpg_valid && jpg_ready) begin
      if (jpg_addr != 24'(got.size())) begin
        failures++; checks++;
      end
      got.push_back(jpg_data);
    end
    if (collect && jpg_valid && !jpg_ready) n_backpr++;
    if (fifo_almost_full) n_afull++;
    if (pix_we && pix_ready && dut.u_buf_fifo.bank_full[!dut.u_buf_fifo.wbank]) n_pp_line++;
    if (dut.u_dct.u_transpose.in_valid && dut.u_dct.u_transpose.in_ready &&
        dut.u_dct.u_transpose.full[!dut.u_dct.u_transpose.wbank]) n_pp_tr++;
    if (dut.u_zigzag.u_buf.in_valid && dut.u_zigzag.u_buf.in_ready &&
        dut.u_zigzag.u_buf.full[!dut.u_zigzag.u_buf.wbank]) n_pp_zz++;
    if (dut.u_rle.u_buf.in_valid && dut.u_rle.u_buf.in_ready &&
        dut.u_rle.u_buf.full[!dut.u_rle.u_buf.wbank]) n_pp_rle++;
    if (dut.u_huffman.u_buf.in_valid && dut.u_huffman.u_buf.in_ready &&
        dut.u_huffman.u_buf.full[!dut.u_huffman.u_buf.wbank]) n_pp_huf++;
  end
  always @(negedge clk) jpg_ready = ($urandom_range(0, 99) < 70);

  task automatic encode(int w, int h, int seed, bit custom_q);
    logic [23:0] pix [];
    logic [7:0]  q [64];
    bq_t exp;
    int  st[4];
    int  idx;
    pix = new[w*h];
    void'($urandom(seed));
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        logic [23:0] p;
        if (x < w/3)             p = 24'($urandom);
        else if (x < 2*w/3)      p = {8'(x*4), 8'(y*3), 8'(255 - x*2)};
        else                     p = ((x + y) % 2 == 1) ? 24'hD0D0D0 : 24'h303030;
        pix[y*w + x] = p;
      end
    for (int j = 0; j < 64; j++) q[j] = custom_q ? 8'(DEFAULT_QTAB[j] / 2 + 1) : DEFAULT_QTAB[j];
    exp = jpeg_ref::ref_encode(pix, w, h, q, st);

    host_write(8'h02, 16'(w));
    host_write(8'h03, 16'(h));
    for (int j = 0; j < 64; j++) begin
      host_write(8'h40 + 8'(j), 16'(q[j]));
      n_qprog++;
    end
    host_addr = 8'h03;
    @(negedge clk);
    check(host_rdata == 16'(h), "image height register read back");
    got.delete();
    collect = 1'b1;
    host_write(8'h00, 16'h0001);
    idx = 0;
    while (idx < w*h) begin
      @(negedge clk);
      if (idx % w == 5) n_pcount++;
      check(pixel_count == 16'(idx % w), "PIXEL_COUNT follows the writes of a line");
      if ($urandom_range(0, 9) != 0) begin
        pix_we = 1'b1; pix_data = pix[idx];
        if (pix_ready) idx++;
        else if (fifo_full) n_full++;
      end else begin
        pix_we = 1'b0;
      end
    end
    @(negedge clk); pix_we = 1'b0;
    while (!done) @(negedge clk);
    repeat (5) @(negedge clk);
    collect = 1'b0;
    host_addr = 8'h01;
    @(negedge clk);
    check(host_rdata[1:0] == 2'b10, "status done, not busy");

    check(got.size() == exp.size(), $sformatf("file size %0d expected %0d", got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      check(got[i] == exp[i], $sformatf("byte %0d: got %02x expected %02x", i, got[i], exp[i]));
    if (got.size() >= HDR_LEN + 2) begin
      if (got[0] == 8'hFF && got[1] == 8'hD8) n_hdr++;
      if (got[got.size()-2] == 8'hFF && got[got.size()-1] == 8'hD9) n_eoi++;
      for (int i = HDR_LEN; i < got.size() - 2; i++)
        if (got[i] == 8'hFF && got[i+1] == 8'h00) n_stuff++;
    end
    n_zrl += st[0];
    n_eob += st[1];
    $display("image %0dx%0d: %0d bytes, %0d blocks, %0d ZRL, %0d EOB, %0d stuffed, cycle %0d",
             w, h, got.size(), st[3], st[0], st[1], st[2], cycles);
  endtask

  initial begin
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    encode(IMG_W, IMG_H, 7, 1'b1);
    encode(32, 8, 11, 1'b0);
    check(n_full > 0,   "host stalled by fifo_full");
    check(n_afull > 0,  "fifo_almost_full seen");
    check(n_backpr > 0, "output back-pressure");
    check(n_stuff > 0,  "0xFF byte stuffing");
    check(n_zrl > 0,    "ZRL codes");
    check(n_eob > 0,    "EOB codes");
    check(n_hdr == 2,   "two headers");
    check(n_eoi == 2,   "two EOI markers");
    check(n_qprog > 0,  "quantization table programmed");
    check(n_pcount > 0, "pixel counter observed");
    check(n_pp_line > 0, "line buffer stripe ping-pong overlap");
    check(n_pp_tr > 0,   "DCT transpose ping-pong overlap");
    check(n_pp_zz > 0,   "zig-zag ping-pong overlap");
    check(n_pp_rle > 0,  "run-length ping-pong overlap");
    check(n_pp_huf > 0,  "Huffman ping-pong overlap");
    $display("mechanisms: full=%0d almost_full=%0d backpressure=%0d stuffing=%0d zrl=%0d eob=%0d",
             n_full, n_afull, n_backpr, n_stuff, n_zrl, n_eob);
    $display("ping-pong overlap cycles: line=%0d transpose=%0d zigzag=%0d rle=%0d huffman=%0d",
             n_pp_line, n_pp_tr, n_pp_zz, n_pp_rle, n_pp_huf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
