// tb_huffman: random run-length symbols (DC categories 0..11, AC run/size
// pairs, EOB, up to three leading ZRL codes; luminance and chrominance)
// through the Huffman coder, with random output stalls. Expected chunks
// use code words derived in the testbench by the T.81 Annex C procedure.
module tb_huffman;
  import jpeg_pkg::*;
  import jpeg_ref_pkg::*;
  localparam int NSYM = 3000;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0;
  logic in_valid = 1'b0, in_ready;
  rle_sym_t in_sym = '0;
  logic out_valid, out_ready = 1'b1;
  vlc_t out_vlc;
  huffman dut (.*);
  always #5 clk = !clk;

  int checks = 0, failures = 0, cyc = 0, nout = 0;
  vlc_t exp_q [$];
  ref_ht_t dc_l, dc_c, ac_l, ac_c;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc == 50000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic vlc_t mk(int code, int clen, int amp, int size, bit be);
    vlc_t v;
    v.bits = (32'(code) << size) | (32'(amp) & ((32'd1 << size) - 1));
    v.len = 6'(clen + size);
    v.blk_end = be;
    return v;
  endfunction

  initial begin
    dc_l = jpeg_ref::ref_table(BITS_DC_L, VALS_DC);
    dc_c = jpeg_ref::ref_table(BITS_DC_C, VALS_DC);
    ac_l = jpeg_ref::ref_table(BITS_AC_L, VALS_AC_L);
    ac_c = jpeg_ref::ref_table(BITS_AC_C, VALS_AC_C);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < NSYM; n++) begin
      rle_sym_t s;
      int kind, size, v, rs;
      ref_ht_t dt, at;
      s = '0;
      s.chroma = 1'($urandom);
      dt = s.chroma ? dc_c : dc_l;
      at = s.chroma ? ac_c : ac_l;
      kind = $urandom_range(0, 3);
      if (kind == 0) begin
        size = $urandom_range(0, 11);
        v = (size == 0) ? 0 : $urandom_range(1 << (size-1), (1 << size) - 1);
        if ($urandom_range(0, 1)) v = -v;
        s.is_dc = 1'b1; s.val = COEF_W'(v);
        exp_q.push_back(mk(dt.code[size], dt.len[size], (v < 0) ? v - 1 : v, size, 1'b0));
      end else if (kind == 1) begin
        s.is_eob = 1'b1; s.blk_end = 1'b1;
        exp_q.push_back(mk(at.code[0], at.len[0], 0, 0, 1'b1));
      end else begin
        size = $urandom_range(1, 10);
        v = $urandom_range(1 << (size-1), (1 << size) - 1);
        if ($urandom_range(0, 1)) v = -v;
        s.run = 4'($urandom_range(0, 15));
        s.zrl = 2'($urandom_range(0, 3));
        s.blk_end = ($urandom_range(0, 7) == 0);
        s.val = COEF_W'(v);
        for (int z = 0; z < s.zrl; z++) exp_q.push_back(mk(at.code[8'hF0], at.len[8'hF0], 0, 0, 1'b0));
        rs = int'(s.run) * 16 + size;
        exp_q.push_back(mk(at.code[rs], at.len[rs], (v < 0) ? v - 1 : v, size, s.blk_end));
      end
      in_valid = 1'b1; in_sym = s;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    in_valid = 1'b0;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    vlc_t e;
    e = exp_q.pop_front();
    checks++;
    if (out_vlc != e) begin
      failures++;
      if (failures < 10) $display("FAIL chunk %0d: got %h/%0d expected %h/%0d", nout,
                                  out_vlc.bits, out_vlc.len, e.bits, e.len);
    end
    nout++;
    if (exp_q.size() == 0 && in_valid == 1'b0) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
