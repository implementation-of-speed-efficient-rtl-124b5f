// tb_quantizer: random and extreme coefficients through the quantizer,
// first with the reset table (Annex K luminance), then with a table
// written through the RAM port (including 1 and 255 entries). Expected
// value round(F/Q), half away from zero, computed with integer division.
// Checks the 13-cycle latency, one sample per cycle, and output stalls.
module tb_quantizer;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;
  localparam int NBLK = 12;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic q_we = 1'b0;
  logic [5:0] q_addr = '0;
  logic [7:0] q_data = '0;
  logic in_valid = 1'b0, in_ready;
  logic signed [COEF_W-1:0] in_data = '0;
  logic out_valid, out_ready = 1'b1;
  logic signed [COEF_W-1:0] out_data;
  quantizer dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0, cyc = 0, nout = 0, t_in0 = -1;
  int exp_q [$];
  logic [7:0] qt [64];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc == 50000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    for (int j = 0; j < 64; j++) qt[j] = DEFAULT_QTAB[j];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int b = 0; b < NBLK; b++) begin
      if (b == NBLK/2) begin
        // reprogram the table between blocks once the pipeline has drained
        in_valid = 1'b0;
        while (exp_q.size() != 0) @(negedge clk);
        for (int j = 0; j < 64; j++) begin
          qt[j] = (j == 0) ? 8'd1 : (j == 1) ? 8'd255 : 8'($urandom_range(1, 255));
          q_we = 1'b1; q_addr = 6'(j); q_data = qt[j];
          @(negedge clk);
        end
        q_we = 1'b0;
      end
      for (int j = 0; j < 64; j++) begin
        int f;
        f = (b == 0 && j < 4) ? ((j == 0) ? 1016 : (j == 1) ? -1024 : (j == 2) ? 8 : -8)
                              : $urandom_range(0, 2047) - 1024;
        in_valid = 1'b1; in_data = COEF_W'(f);
        #1;
        while (!in_ready) begin @(negedge clk); #1; end
        if (t_in0 < 0) t_in0 = cyc;
        exp_q.push_back(jpeg_ref::ref_quant(f, qt[j]));
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
  end

  always @(negedge clk) out_ready = (nout < 64) ? 1'b1 : ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int e;
    e = exp_q.pop_front();
    checks++;
    if (out_data != COEF_W'(e)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d: got %0d expected %0d", nout, out_data, e);
    end
    if (nout == 0) begin
      checks++;
      if (cyc - t_in0 != 13) begin failures++; $display("FAIL latency %0d", cyc - t_in0); end
    end
    nout++;
    if (nout == NBLK*64) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
