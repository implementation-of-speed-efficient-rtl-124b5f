// tb_byte_stuffer: random bit chunks of 1..27 bits (runs of ones included,
// so 0xFF bytes appear) through the byte packer, then flush. The expected
// byte stream, with a 0x00 after each 0xFF and 1-bit padding of the last
// byte, comes from a bit-serial writer. Random output stalls; checks that
// empty rises at the end and that stuffing occurred.
module tb_byte_stuffer;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;
  localparam int NCH = 3000;
  logic clk = 1'b0, rst_n = 1'b0, flush = 1'b0;
  logic in_valid = 1'b0, in_ready;
  vlc_t in_vlc = '0;
  logic out_valid, out_ready = 1'b1;
  logic [7:0] out_data;
  logic empty;
  byte_stuffer dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0, cyc = 0, nout = 0;
  bitwriter bw;
  byte unsigned got [$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc == 60000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  always @(posedge clk) if (rst_n && out_valid && out_ready) got.push_back(out_data);
  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  initial begin
    bw = new();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < NCH; n++) begin
      int len;
      logic [31:0] bits;
      len = $urandom_range(1, 27);
      bits = ($urandom_range(0, 3) == 0) ? 32'hFFFF_FFFF : $urandom;
      bits = bits & ((32'd1 << len) - 1);
      bw.put(int'(bits), len);
      in_valid = 1'b1; in_vlc.bits = bits; in_vlc.len = 6'(len); in_vlc.blk_end = 1'b0;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    // a 3-bit tail, so padding is needed
    bw.put(5, 3);
    in_valid = 1'b1; in_vlc.bits = 32'd5; in_vlc.len = 6'd3;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 1'b0;
    bw.pad();
    flush = 1'b1;
    @(negedge clk);
    while (!empty) @(negedge clk);
    flush = 1'b0;
    repeat (3) @(negedge clk);
    checks++;
    if (got.size() != bw.bytes.size()) begin
      failures++;
      $display("FAIL size %0d expected %0d", got.size(), bw.bytes.size());
    end
    for (int i = 0; i < got.size() && i < bw.bytes.size(); i++) begin
      checks++;
      if (got[i] != bw.bytes[i]) begin
        failures++;
        if (failures < 10) $display("FAIL byte %0d: %02x expected %02x", i, got[i], bw.bytes[i]);
      end
    end
    checks++;
    if (bw.stuffs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
