// tb_dct_2d: streams random and extreme 8x8 blocks through the 2-D DCT
// back to back and compares each coefficient (column-major output order)
// with a matrix-product DCT whose basis is computed with $cos. Checks the
// steady-state rate of one block per 64 cycles and random output stalls.
module tb_dct_2d;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;
  localparam int NBLK = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic signed [7:0] in_data = '0;
  logic out_valid, out_ready = 1'b1;
  logic signed [COEF_W-1:0] out_data;
  dct_2d dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0, cyc = 0;
  int blocks [NBLK][64];
  int exp_q [$];
  bit stall_phase = 1'b0;
  int t_first = -1, t_last = -1, nout = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc == 100000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    blk_t f, F;
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++)
        case (b)
          0: blocks[b][i] = 127;
          1: blocks[b][i] = -128;
          2: blocks[b][i] = ((i / 8 + i % 8) % 2) ? 127 : -128;
          default: blocks[b][i] = $signed(8'($urandom));
        endcase
    for (int b = 0; b < NBLK; b++) begin
      for (int i = 0; i < 64; i++) f[i] = blocks[b][i];
      F = jpeg_ref::ref_dct2(f);
      for (int v = 0; v < 8; v++)
        for (int u = 0; u < 8; u++) exp_q.push_back(F[u*8+v]);
    end
  end

  // driver: continuous, with a gap-free stream
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int b = 0; b < NBLK; b++)
      for (int i = 0; i < 64; i++) begin
        in_valid = 1'b1; in_data = 8'(blocks[b][i]);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
    in_valid = 1'b0;
  end

  // output: full speed for the first 20 blocks, then random stalls
  always @(negedge clk) out_ready = (nout < 20*64) ? 1'b1 : ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int e;
    e = exp_q.pop_front();
    checks++;
    if (out_data != e) begin
      failures++;
      if (failures < 10) $display("FAIL coef %0d: got %0d expected %0d", nout, out_data, e);
    end
    if (nout == 64) t_first = cyc;
    if (nout == 19*64) t_last = cyc;
    nout++;
    if (nout == NBLK*64) begin
      checks++;
      // 18 blocks between the two marks, at 64 cycles each
      if (t_last - t_first != 18*64) begin
        failures++;
        $display("FAIL rate: %0d cycles for 18 blocks", t_last - t_first);
      end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
