// tb_header_ram: checks the initial content against a JFIF header
// assembled marker by marker in the testbench (default table, 640x480),
// that the rest of the 2048 bytes is zero, writes through port A and reads
// back through port B, and that the read output holds while rd_en is low.
module tb_header_ram;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;
  logic clk = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [10:0] wr_addr = '0, rd_addr = '0;
  logic [7:0] wr_data = '0, rd_data;
  header_ram dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0;
  bq_t hdr;
  logic [7:0] q [64];

  task automatic rd(int a, output logic [7:0] d);
    @(negedge clk); rd_en = 1'b1; rd_addr = 11'(a);
    @(negedge clk); rd_en = 1'b0; d = rd_data;
  endtask

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    logic [7:0] d;
    for (int j = 0; j < 64; j++) q[j] = DEFAULT_QTAB[j];
    hdr = jpeg_ref::ref_header(q, 640, 480);
    chk(hdr.size() == HDR_LEN, "header length");
    for (int a = 0; a < 2048; a++) begin
      rd(a, d);
      chk(d == ((a < hdr.size()) ? hdr[a] : 8'h00), $sformatf("byte %0d = %02x", a, d));
    end
    for (int a = 0; a < 2048; a += 97) begin
      @(negedge clk); wr_en = 1'b1; wr_addr = 11'(a); wr_data = 8'(a * 7 + 3);
    end
    @(negedge clk); wr_en = 1'b0;
    for (int a = 0; a < 2048; a += 97) begin
      rd(a, d);
      chk(d == 8'(a * 7 + 3), $sformatf("written byte %0d", a));
    end
    rd(97, d);
    rd_addr = 11'd0;
    repeat (3) @(negedge clk);
    chk(rd_data == 8'(97 * 7 + 3), "output holds without rd_en");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
