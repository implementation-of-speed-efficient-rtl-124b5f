// tb_jpeg_ctrl: the controller against simple models of its neighbours.
// For a 32x16 image (4 MCUs, 16 blocks): start must give clr and a header
// request; after the header is ready, 16 block-done pulses must lead to
// flush, flush must last until the stuffer reports empty, then an EOI
// request, and done after the EOI is ready. A second start clears done.
module tb_jpeg_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  logic [15:0] img_w = 16'd32, img_h = 16'd16;
  logic clr, busy, done, start_jfif, eoi, flush;
  logic ready_jfif = 1'b0, blk_done = 1'b0, stuffer_empty = 1'b0;
  jpeg_ctrl dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int n_hdr_req = 0, n_eoi_req = 0;

  always @(posedge clk) begin
    if (start_jfif && !eoi) n_hdr_req++;
    if (start_jfif && eoi)  n_eoi_req++;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic one_image();
    int hdr0, eoi0;
    hdr0 = n_hdr_req; eoi0 = n_eoi_req;
    start = 1'b1; #1; chk(clr, "clr with start");
    @(negedge clk); start = 1'b0;
    chk(busy && !done, "busy after start");
    repeat (3) @(negedge clk);
    chk(n_hdr_req == hdr0 + 1, "header requested");
    ready_jfif = 1'b1; @(negedge clk); ready_jfif = 1'b0;
    for (int b = 0; b < 16; b++) begin
      chk(!flush, "no flush before the last block");
      blk_done = 1'b1; @(negedge clk); blk_done = 1'b0;
      repeat (2) @(negedge clk);
    end
    @(negedge clk);
    chk(flush, "flush after the last block");
    repeat (5) @(negedge clk);
    chk(flush && n_eoi_req == eoi0, "flush holds until the stuffer is empty");
    stuffer_empty = 1'b1; @(negedge clk); stuffer_empty = 1'b0;
    @(negedge clk);
    chk(!flush && n_eoi_req == eoi0 + 1, "EOI requested");
    chk(!done, "not done before EOI is out");
    ready_jfif = 1'b1; @(negedge clk); ready_jfif = 1'b0;
    @(negedge clk);
    chk(done && !busy, "done");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    one_image();
    one_image();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
