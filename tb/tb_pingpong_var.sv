// tb_pingpong_var: streams blocks of 1..64 words through the variable-length
// ping-pong buffer. The first ten blocks are 64 words long and pass with
// no gaps or stalls; there the testbench checks the rate of one word per
// cycle. After that, block lengths are random, with many 1-word and 64-word
// blocks. Some 64-word blocks are closed only by the depth limit, without
// in_last. The input has random gaps and the output random stalls. Every
// word and its out_last flag are compared with a queue of what was
// written. The testbench also checks that the writer is held off while
// both banks are full.
module tb_pingpong_var;
  localparam int NBLK = 200;
  localparam int W    = 16;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         in_valid = 1'b0, in_last = 1'b0, in_ready;
  logic [W-1:0] in_data = '0;
  logic         out_valid, out_ready = 1'b1, out_last;
  logic [W-1:0] out_data;

  pingpong_var #(.W(W), .DEPTH(64)) dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0, cyc = 0, nout = 0, t0 = 0, n_block = 0;
  int n_one = 0, n_full = 0, n_nolast = 0;
  bit free_run = 1'b1, sent_all = 1'b0;
  logic [W:0] exp_q [$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc == 100000) begin
      failures++;
      $display("FAIL watchdog");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    int len, word;
    bit mark_last;
    word = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int b = 0; b < NBLK; b++) begin
      if (b < 10) len = 64;
      else begin
        case ($urandom_range(0, 3))
          0:       len = 1;
          1:       len = 64;
          default: len = $urandom_range(1, 64);
        endcase
      end
      // a 64-word block may end by the depth limit alone
      mark_last = !(len == 64 && b >= 10 && $urandom_range(0, 1) == 0);
      if (len == 1) n_one++;
      if (len == 64) n_full++;
      if (!mark_last) n_nolast++;
      for (int i = 0; i < len; i++) begin
        while (!free_run && $urandom_range(0, 3) == 0) begin
          in_valid = 1'b0; @(negedge clk);
        end
        in_valid = 1'b1;
        in_data  = W'(word);
        in_last  = (i == len - 1) && mark_last;
        #1;
        while (!in_ready) begin
          n_block++;
          @(negedge clk); #1;
        end
        exp_q.push_back({i == len - 1, in_data});
        word++;
        @(negedge clk);
      end
    end
    in_valid = 1'b0;
    in_last  = 1'b0;
    sent_all = 1'b1;
  end

  always @(negedge clk) begin
    free_run  = (nout < 10*64);
    out_ready = free_run ? 1'b1 : ($urandom_range(0, 2) != 0);
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    logic [W:0] e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL output %0d with nothing written", nout);
    end else begin
      e = exp_q.pop_front();
      if ({out_last, out_data} != e) begin
        failures++;
        if (failures < 10)
          $display("FAIL word %0d: got %0d last %0b, expected %0d last %0b",
                   nout, out_data, out_last, e[W-1:0], e[W]);
      end
    end
    if (nout == 64) t0 = cyc;
    if (nout == 9*64) begin
      checks++;
      if (cyc - t0 != 8*64) begin failures++; $display("FAIL rate %0d", cyc - t0); end
    end
    nout++;
  end

  initial begin
    wait (rst_n);
    wait (sent_all && exp_q.size() == 0);
    repeat (20) @(posedge clk);
    checks += 4;
    if (exp_q.size() != 0 || out_valid) begin failures++; $display("FAIL words left over"); end
    if (n_block == 0)  begin failures++; $display("FAIL writer never held off"); end
    if (n_one == 0)    begin failures++; $display("FAIL no 1-word block"); end
    if (n_nolast == 0) begin failures++; $display("FAIL no block closed by the depth limit"); end
    $display("blocks %0d (1-word %0d, 64-word %0d, closed by depth %0d), words %0d, writer held %0d cycles",
             NBLK, n_one, n_full, n_nolast, nout, n_block);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
