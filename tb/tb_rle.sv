// tb_rle: blocks of quantized coefficients (zig-zag order) through the
// run-length coder: empty blocks (DC only, then EOB), runs of 16, 32 and 48
// zeros (ZRL counts 1..3), a block ending in a non-zero coefficient (no
// EOB) and random sparse blocks, in the 4:2:2 component order. The expected
// symbol list, including the per-component DC differences, is built in the
// testbench. clr is tested by restarting with fresh DC predictors.
module tb_rle;
  import jpeg_pkg::*;
  localparam int NBLK = 40;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic signed [COEF_W-1:0] in_data = '0;
  logic out_valid, out_ready = 1'b1;
  rle_sym_t out_sym;
  rle dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0, cyc = 0, nout = 0, nexp = 0;
  rle_sym_t exp_q [$];
  int n_zrl3 = 0, n_eob = 0, n_noeob = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc == 50000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic run_blocks(int nb);
    int pred [3];
    pred = '{0, 0, 0};
    for (int b = 0; b < nb; b++) begin
      int c [64];
      int comp, z;
      rle_sym_t s;
      comp = (b % 4 < 2) ? 0 : b % 4 - 1;
      for (int j = 0; j < 64; j++) c[j] = 0;
      c[0] = $urandom_range(0, 2000) - 1000;
      case (b % 8)
        0: ;                                   // DC only
        1: c[17] = 5;                          // 16 zeros before it
        2: begin c[1] = -3; c[34] = 7; end     // 32 zeros
        3: begin c[49] = -1; c[63] = 2; end    // 48 zeros, ends non-zero
        default:
          for (int j = 1; j < 64; j++)
            if ($urandom_range(0, 5) == 0) c[j] = $urandom_range(0, 200) - 100;
      endcase
      s = '0; s.is_dc = 1'b1; s.chroma = (comp != 0); s.val = COEF_W'(c[0] - pred[comp]);
      pred[comp] = c[0];
      exp_q.push_back(s);
      z = 0;
      for (int j = 1; j < 64; j++)
        if (c[j] == 0) z++;
        else begin
          s = '0; s.chroma = (comp != 0); s.run = 4'(z % 16); s.zrl = 2'(z / 16);
          s.val = COEF_W'(c[j]); s.blk_end = (j == 63);
          if (z >= 48) n_zrl3++;
          exp_q.push_back(s);
          z = 0;
        end
      if (c[63] == 0) begin
        s = '0; s.is_eob = 1'b1; s.chroma = (comp != 0); s.blk_end = 1'b1;
        exp_q.push_back(s);
        n_eob++;
      end else n_noeob++;
      for (int j = 0; j < 64; j++) begin
        in_valid = 1'b1; in_data = COEF_W'(c[j]);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    run_blocks(NBLK);
    while (exp_q.size() != 0) @(negedge clk);
    clr = 1'b1; @(negedge clk); clr = 1'b0;
    run_blocks(8);
    while (exp_q.size() != 0 && cyc < 40000) @(negedge clk);
    checks++;
    if (n_zrl3 == 0 || n_eob == 0 || n_noeob == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    rle_sym_t e;
    e = exp_q.pop_front();
    checks++;
    if (out_sym != e) begin
      failures++;
      if (failures < 10) $display("FAIL sym %0d: got %h expected %h", nout, out_sym, e);
    end
    nout++;
  end
endmodule
