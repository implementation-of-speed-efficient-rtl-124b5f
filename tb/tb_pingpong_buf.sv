// tb_pingpong_buf: streams numbered blocks into two ping-pong buffers, one
// reading in arrival order and one transposing, with random gaps on the
// input and random stalls on the output. Checks every word, that a full
// stream passes at one word per cycle, and that the writer is held off
// (in_ready low) while both banks are full.
module tb_pingpong_buf;
  import jpeg_pkg::*;
  localparam int NBLK = 30;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [11:0] in_data = '0;
  logic in_ready_l, in_ready_t;
  logic out_valid_l, out_valid_t, out_ready = 1'b1;
  logic [11:0] out_l, out_t;
  logic [5:0] idx_l, idx_t;
  logic gaps = 1'b0;

  pingpong_buf #(.W(12), .ORDER(RD_LINEAR)) u_lin (
    .clk, .rst_n, .in_valid, .in_ready(in_ready_l), .in_data,
    .rd_idx(idx_l), .rd_addr(idx_l), .out_valid(out_valid_l), .out_ready, .out_data(out_l));
  pingpong_buf #(.W(12), .ORDER(RD_TRANSPOSE)) u_tr (
    .clk, .rst_n, .in_valid, .in_ready(in_ready_t), .in_data,
    .rd_idx(idx_t), .rd_addr(idx_t), .out_valid(out_valid_t), .out_ready, .out_data(out_t));
  always #5 clk = !clk;

  int checks = 0, failures = 0, cyc = 0, nout = 0, t0 = 0, n_block = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc == 50000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < NBLK*64; i++) begin
      while (gaps && $urandom_range(0, 3) == 0) begin in_valid = 1'b0; @(negedge clk); end
      in_valid = 1'b1; in_data = 12'(i);
      #1;
      while (!in_ready_l) begin
        if (!out_ready) n_block++;
        @(negedge clk); #1;
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
  end

  always @(negedge clk) begin
    gaps      = (nout >= 10*64);
    out_ready = (nout < 10*64) ? 1'b1 : (nout < 20*64) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 2) != 0);
  end

  always @(posedge clk) if (rst_n && out_valid_l && out_ready) begin
    int b, i, el, et;
    b = nout / 64; i = nout % 64;
    el = b*64 + i;
    et = b*64 + (i % 8)*8 + i / 8;
    checks += 3;
    if (out_l != 12'(el)) begin failures++; if (failures < 10) $display("FAIL linear %0d: %0d", nout, out_l); end
    if (out_t != 12'(et)) begin failures++; if (failures < 10) $display("FAIL transpose %0d: %0d", nout, out_t); end
    if (out_valid_t != out_valid_l || in_ready_t != in_ready_l) failures++;
    if (nout == 64) t0 = cyc;
    if (nout == 9*64) begin
      checks++;
      if (cyc - t0 != 8*64) begin failures++; $display("FAIL rate %0d", cyc - t0); end
    end
    nout++;
    if (nout == NBLK*64) begin
      checks++;
      if (n_block == 0) begin failures++; $display("FAIL writer never held off"); end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
