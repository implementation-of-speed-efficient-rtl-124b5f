// tb_host_if: register writes and reads of the host interface. Checks the
// reset image size, size and table writes with their copies into the
// header RAM port (two bytes for a size or a table entry, with host_wait
// during the second),
// the quantization RAM port, the start pulse, and the status register.
module tb_host_if;
  import jpeg_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic host_we = 1'b0;
  logic [7:0] host_addr = '0;
  logic [15:0] host_wdata = '0;
  logic [15:0] host_rdata;
  logic host_wait;
  logic busy = 1'b0, done = 1'b0;
  logic start;
  logic [15:0] img_w, img_h;
  logic q_we;
  logic [5:0] q_addr;
  logic [7:0] q_data;
  logic hdr_we;
  logic [10:0] hdr_addr;
  logic [7:0] hdr_data;
  host_if dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0, n_start = 0;
  logic [7:0] hdr [2048];
  logic [7:0] qr [64];
  int hdr_wr = 0;

  always @(posedge clk) begin
    if (hdr_we) begin hdr[hdr_addr] <= hdr_data; hdr_wr++; end
    if (q_we) qr[q_addr] <= q_data;
    if (start) n_start++;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic wr(logic [7:0] a, logic [15:0] d);
    @(negedge clk);
    while (host_wait) @(negedge clk);
    host_we = 1'b1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_we = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    host_addr = 8'h02; #1; chk(host_rdata == 16'd640, "reset width");
    host_addr = 8'h03; #1; chk(host_rdata == 16'd480, "reset height");
    wr(8'h02, 16'h0123);
    chk(host_wait, "host_wait during second header byte");
    wr(8'h03, 16'h0456);
    @(negedge clk); @(negedge clk);
    chk(img_w == 16'h0123 && img_h == 16'h0456, "size registers");
    chk(hdr[HDR_SOF_W] == 8'h01 && hdr[HDR_SOF_W+1] == 8'h23, "width in header");
    chk(hdr[HDR_SOF_H] == 8'h04 && hdr[HDR_SOF_H+1] == 8'h56, "height in header");
    for (int j = 0; j < 64; j++) begin
      wr(8'h40 + 8'(j), 16'(j * 3 + 1));
      chk(host_wait, "host_wait during second DQT byte");
    end
    @(negedge clk);
    for (int j = 0; j < 64; j++) begin
      chk(qr[j] == 8'(j * 3 + 1), $sformatf("quant RAM %0d", j));
      chk(hdr[25 + j] == 8'(j * 3 + 1), $sformatf("DQT table 0 byte %0d", j));
      chk(hdr[94 + j] == 8'(j * 3 + 1), $sformatf("DQT table 1 byte %0d", j));
    end
    chk(hdr_wr == 4 + 128, "number of header writes");
    chk(n_start == 0, "no start yet");
    wr(8'h00, 16'h0001);
    @(negedge clk);
    chk(n_start == 1, "one start pulse");
    busy = 1'b1; host_addr = 8'h01; #1; chk(host_rdata == 16'h0001, "status busy");
    busy = 1'b0; done = 1'b1; #1; chk(host_rdata == 16'h0002, "status done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
