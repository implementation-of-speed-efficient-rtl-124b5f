// tb_zigzag: blocks of numbered coefficients in column-major order through
// the zig-zag unit; the expected zig-zag sequence is generated by walking
// the anti-diagonals of the 8x8 block (not from a table). Random output
// stalls; checks the 64-cycle block rate with the pipeline full.
module tb_zigzag;
  import jpeg_pkg::*;
  localparam int NBLK = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic signed [COEF_W-1:0] in_data = '0;
  logic out_valid, out_ready = 1'b1;
  logic signed [COEF_W-1:0] out_data;
  zigzag dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0, cyc = 0, nout = 0, t0 = 0;
  int zz [64];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc == 50000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    int k;
    k = 0;
    for (int s = 0; s < 15; s++)
      for (int t = 0; t <= s; t++) begin
        int r, c;
        r = (s % 2 == 0) ? s - t : t;   // even diagonals go up, odd go down
        c = s - r;
        if (r < 8 && c < 8) zz[k++] = r*8 + c;
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) begin
        // column-major: i = col*8 + row, value encodes block and raster position
        in_valid = 1'b1; in_data = COEF_W'(b*64 + (i % 8)*8 + i / 8);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
    in_valid = 1'b0;
  end

  always @(negedge clk) out_ready = (nout < 10*64) ? 1'b1 : ($urandom_range(0, 2) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int e;
    e = (nout / 64) * 64 + zz[nout % 64];
    checks++;
    if (out_data != COEF_W'(e)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d: got %0d expected %0d", nout, out_data, e);
    end
    if (nout == 64) t0 = cyc;
    if (nout == 9*64) begin
      checks++;
      if (cyc - t0 != 8*64) begin failures++; $display("FAIL rate %0d", cyc - t0); end
    end
    nout++;
    if (nout == NBLK*64) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
