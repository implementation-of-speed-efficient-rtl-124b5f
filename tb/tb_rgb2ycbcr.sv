// tb_rgb2ycbcr: random pixel pairs (and white, black, pure blue and pure
// red, which reach the clamp limits) through the colour converter in all
// three modes, compared with the conversion equations evaluated in the
// testbench. Checks the two-cycle latency and output stalls.
module tb_rgb2ycbcr;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;
  localparam int N = 3000;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  pix_pair_t in_pair = '0;
  logic out_valid, out_ready = 1'b1;
  logic signed [7:0] out_data;
  rgb2ycbcr dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0, cyc = 0, nout = 0, t_in0 = -1;
  int exp_q [$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc == 50000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    logic [23:0] fixed [4];
    fixed = '{24'hFFFFFF, 24'h000000, 24'h0000FF, 24'hFF0000};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < N; n++) begin
      pix_pair_t p;
      int c;
      c = n % 3;
      p.comp = comp_e'(c);
      p.pa = (n < 12) ? fixed[n / 3] : 24'($urandom);
      p.pb = (n < 12) ? fixed[n / 3] : 24'($urandom);
      exp_q.push_back(jpeg_ref::ref_color(c, p.pa[23:16], p.pa[15:8], p.pa[7:0],
                                          p.pb[23:16], p.pb[15:8], p.pb[7:0]));
      in_valid = 1'b1; in_pair = p;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      if (t_in0 < 0) t_in0 = cyc;
      @(negedge clk);
    end
    in_valid = 1'b0;
  end

  always @(negedge clk) out_ready = (nout < 100) ? 1'b1 : ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int e;
    e = exp_q.pop_front();
    checks++;
    if (out_data != 8'(e)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d: got %0d expected %0d", nout, out_data, e);
    end
    if (nout == 0) begin
      checks++;
      if (cyc - t_in0 != 2) begin failures++; $display("FAIL latency %0d", cyc - t_in0); end
    end
    nout++;
    if (nout == N) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
