// tb_dct_1d: random groups of eight 8-bit samples through the ROM-based
// 1-D DCT (row configuration), compared with a multiply-accumulate DCT
// whose basis comes from $cos. Checks the rate: 8 outputs per 8 cycles in
// a steady stream, and correct operation under random output stalls.
module tb_dct_1d;
  import jpeg_ref_pkg::*;
  localparam int NGRP = 200;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic signed [7:0] in_data = '0;
  logic out_valid, out_ready = 1'b1;
  logic signed [12:0] out_data;
  dct_1d #(.IN_W(8), .OUT_W(13), .SHIFT(10)) dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0, cyc = 0, nout = 0, t0 = 0;
  int xs [NGRP][8];
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
    int y[8];
    for (int g = 0; g < NGRP; g++) begin
      for (int n = 0; n < 8; n++)
        xs[g][n] = (g == 0) ? -128 : (g == 1) ? 127 : $signed(8'($urandom));
      jpeg_ref::dct8(xs[g], 10, 4095, y);
      for (int k = 0; k < 8; k++) exp_q.push_back(y[k]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int g = 0; g < NGRP; g++)
      for (int n = 0; n < 8; n++) begin
        in_valid = 1'b1; in_data = 8'(xs[g][n]);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
    in_valid = 1'b0;
  end

  always @(negedge clk) out_ready = (nout < 100*8) ? 1'b1 : ($urandom_range(0, 2) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int e;
    e = exp_q.pop_front();
    checks++;
    if (out_data != e) begin
      failures++;
      if (failures < 10) $display("FAIL out %0d: got %0d expected %0d", nout, out_data, e);
    end
    if (nout == 8) t0 = cyc;
    if (nout == 88) begin
      checks++;
      if (cyc - t0 != 80) begin
        failures++;
        $display("FAIL rate: %0d cycles for 80 outputs", cyc - t0);
      end
    end
    nout++;
    if (nout == NGRP*8) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
