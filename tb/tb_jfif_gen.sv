// tb_jfif_gen: the JFIF generator with its header RAM. Requests the header
// (start_jfif, eoi = 0) and compares the 623 bytes with a header assembled
// in the testbench, then passes 300 scan bytes through, then requests EOI
// and checks FF D9. The output is throttled at random; out_addr must count
// the bytes, and ready_jfif must pulse once after the header and once
// after EOI.
module tb_jfif_gen;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start_jfif = 1'b0, eoi = 1'b0, ready_jfif;
  logic hdr_rd_en;
  logic [10:0] hdr_rd_addr;
  logic [7:0] hdr_rd_data;
  logic scan_valid = 1'b0, scan_ready;
  logic [7:0] scan_data = '0;
  logic out_valid, out_ready = 1'b1;
  logic [7:0] out_data;
  logic [23:0] out_addr;

  jfif_gen dut (.*);
  header_ram u_ram (.clk, .wr_en(1'b0), .wr_addr(11'd0), .wr_data(8'd0),
                    .rd_en(hdr_rd_en), .rd_addr(hdr_rd_addr), .rd_data(hdr_rd_data));
  always #5 clk = !clk;

  int checks = 0, failures = 0, cyc = 0, n_ready = 0;
  byte unsigned got [$];
  bq_t exp;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc == 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    if (ready_jfif) n_ready++;
    if (out_valid && out_ready) begin
      checks++;
      if (out_addr != 24'(got.size())) failures++;
      got.push_back(out_data);
    end
  end
  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);

  initial begin
    logic [7:0] q [64];
    for (int j = 0; j < 64; j++) q[j] = DEFAULT_QTAB[j];
    exp = jpeg_ref::ref_header(q, 640, 480);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start_jfif = 1'b1; @(negedge clk); start_jfif = 1'b0;
    while (n_ready == 0) @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      exp.push_back(b);
      scan_valid = 1'b1; scan_data = b;
      #1;
      while (!scan_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    scan_valid = 1'b0;
    exp.push_back(8'hFF); exp.push_back(8'hD9);
    start_jfif = 1'b1; eoi = 1'b1; @(negedge clk); start_jfif = 1'b0; eoi = 1'b0;
    while (n_ready < 2) @(negedge clk);
    repeat (4) @(negedge clk);
    checks++;
    if (got.size() != exp.size()) begin
      failures++;
      $display("FAIL size %0d expected %0d", got.size(), exp.size());
    end
    for (int i = 0; i < got.size() && i < exp.size(); i++) begin
      checks++;
      if (got[i] != exp[i]) begin
        failures++;
        if (failures < 10) $display("FAIL byte %0d: %02x expected %02x", i, got[i], exp[i]);
      end
    end
    checks++;
    if (n_ready != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
