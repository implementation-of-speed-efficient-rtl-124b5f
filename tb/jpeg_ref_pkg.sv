// jpeg_ref_pkg: behavioural reference model of the encoder, for testbenches.
//
// Written independently of the RTL data path: the DCT basis is computed
// with $cos, the DCT is a plain matrix product, the Huffman code words are
// derived with the HUFFSIZE/HUFFCODE procedure of T.81 Annex C from the
// standard code-length lists, and the header is assembled marker by marker.
// Only the standard's data (code-length and symbol lists, zig-zag order)
// is taken from jpeg_pkg.
package jpeg_ref_pkg;
  import jpeg_pkg::*;

  typedef int blk_t [64];
  typedef byte unsigned bq_t [$];

  typedef struct { int code[256]; int len[256]; } ref_ht_t;

  // ------------------------------------------------------- bit writer state
  class bitwriter;
    bq_t bytes;
    int  acc = 0;
    int  n = 0;
    int  stuffs = 0;
    int  zrl = 0, eob = 0, blocks = 0;
    int  pred [3] = '{0, 0, 0};
    function void put(int code, int len);
      for (int i = len - 1; i >= 0; i--) begin
        acc = (acc << 1) | ((code >> i) & 1);
        n++;
        if (n == 8) begin
          bytes.push_back(byte'(acc));
          if (acc == 255) begin bytes.push_back(8'h00); stuffs++; end
          acc = 0; n = 0;
        end
      end
    endfunction
    function void pad();
      while (n != 0) put(1, 1);
    endfunction
  endclass

  class jpeg_ref;
    // ---------------------------------------------------------------- colour
    static function automatic int ref_color(int comp, int r0, int g0, int b0, int r1, int g1, int b1);
      // comp 0: Y of pixel 0; 1/2: Cb/Cr of the pair average
      longint s;
      int v;
      if (comp == 0) begin
        s = 19595*longint'(2*r0) + 38470*longint'(2*g0) + 7471*longint'(2*b0);
      end else if (comp == 1) begin
        s = -11056*longint'(r0+r1) - 21712*longint'(g0+g1) + 32768*longint'(b0+b1) + (longint'(1) << 24);
      end else begin
        s = 32768*longint'(r0+r1) - 27440*longint'(g0+g1) - 5328*longint'(b0+b1) + (longint'(1) << 24);
      end
      v = int'((s + 65536) >>> 17);
      if (v > 255) v = 255;
      if (v < 0) v = 0;
      return v - 128;
    endfunction

    // ------------------------------------------------------------------- DCT
    static function automatic int basis(int k, int n);
      real ck = (k == 0) ? 1.0 / $sqrt(2.0) : 1.0;
      return int'(4096.0 * ck / 2.0 * $cos((2*n+1) * k * 3.14159265358979 / 16.0));
    endfunction

    static function automatic int rshift_round(longint a, int s, int maxv);
      longint r = (a + (longint'(1) << (s-1))) >>> s;
      if (r > maxv) r = maxv;
      if (r < -maxv) r = -maxv;
      return int'(r);
    endfunction

    // 1-D DCT of eight values, as done by each pass
    static function automatic void dct8(input int x[8], input int s, input int maxv, output int y[8]);
      for (int k = 0; k < 8; k++) begin
        longint a = 0;
        for (int n = 0; n < 8; n++) a += longint'(x[n]) * basis(k, n);
        y[k] = rshift_round(a, s, maxv);
      end
    endfunction

    // f: raster samples; returns F in raster order (index u*8+v)
    static function automatic blk_t ref_dct2(blk_t f);
      int rows [8][8];
      blk_t F;
      for (int r = 0; r < 8; r++) begin
        int x[8], y[8];
        for (int n = 0; n < 8; n++) x[n] = f[r*8+n];
        dct8(x, 10, 4095, y);
        for (int k = 0; k < 8; k++) rows[r][k] = y[k];
      end
      for (int v = 0; v < 8; v++) begin
        int x[8], y[8];
        for (int r = 0; r < 8; r++) x[r] = rows[r][v];
        dct8(x, 14, 2047, y);
        for (int u = 0; u < 8; u++) F[u*8+v] = y[u];
      end
      return F;
    endfunction

    static function automatic int ref_quant(int f, int q);
      int a = (f < 0) ? -f : f;
      int r;
      if (q == 0) q = 1;
      r = (2*a + q) / (2*q);
      return (f < 0) ? -r : r;
    endfunction

    // --------------------------------------------------------------- Huffman

    static function automatic ref_ht_t ref_table(bits_t bits, vals_t vals);
      ref_ht_t t;
      int huffsize[$], huffcode[$];
      int code, si, k;
      for (int i = 0; i < 256; i++) begin t.code[i] = 0; t.len[i] = 0; end
      for (int l = 1; l <= 16; l++)
        for (int i = 0; i < bits[l-1]; i++) huffsize.push_back(l);
      code = 0; si = huffsize[0]; k = 0;
      while (k < huffsize.size()) begin
        while (k < huffsize.size() && huffsize[k] == si) begin
          huffcode.push_back(code); code++; k++;
        end
        code = code << 1; si++;
      end
      for (int i = 0; i < huffsize.size(); i++) begin
        t.code[vals[i]] = huffcode[i];
        t.len[vals[i]]  = huffsize[i];
      end
      return t;
    endfunction


    // ---------------------------------------------------------------- header
    static function automatic bq_t ref_header(logic [7:0] q[64], int w, int h);
      bq_t b;
      b = '{8'hFF, 8'hD8};
      b = {b, '{8'hFF, 8'hE0, 8'h00, 8'h10, "J", "F", "I", "F", 8'h00, 8'h01, 8'h01,
                8'h00, 8'h00, 8'h01, 8'h00, 8'h01, 8'h00, 8'h00}};
      // the same table twice: table 0 for luminance, table 1 for chrominance
      b = {b, '{8'hFF, 8'hDB, 8'h00, 8'h43, 8'h00}};
      for (int i = 0; i < 64; i++) b.push_back(q[i]);
      b = {b, '{8'hFF, 8'hDB, 8'h00, 8'h43, 8'h01}};
      for (int i = 0; i < 64; i++) b.push_back(q[i]);
      b = {b, '{8'hFF, 8'hC0, 8'h00, 8'h11, 8'h08, byte'(h >> 8), byte'(h), byte'(w >> 8), byte'(w),
                8'h03, 8'h01, 8'h21, 8'h00, 8'h02, 8'h11, 8'h01, 8'h03, 8'h11, 8'h01}};
      // four DHT segments; the length counts itself, the class/id byte,
      // the 16 code counts and the symbols
      b = {b, '{8'hFF, 8'hC4, 8'h00, byte'(2 + 1 + 16 + 12)}};
      b.push_back(8'h00); for (int i = 0; i < 16; i++) b.push_back(BITS_DC_L[i]);
      for (int i = 0; i < 12; i++) b.push_back(byte'(i));
      b = {b, '{8'hFF, 8'hC4, 8'h00, byte'(2 + 1 + 16 + 162)}};
      b.push_back(8'h10); for (int i = 0; i < 16; i++) b.push_back(BITS_AC_L[i]);
      for (int i = 0; i < 162; i++) b.push_back(VALS_AC_L[i]);
      b = {b, '{8'hFF, 8'hC4, 8'h00, byte'(2 + 1 + 16 + 12)}};
      b.push_back(8'h01); for (int i = 0; i < 16; i++) b.push_back(BITS_DC_C[i]);
      for (int i = 0; i < 12; i++) b.push_back(byte'(i));
      b = {b, '{8'hFF, 8'hC4, 8'h00, byte'(2 + 1 + 16 + 162)}};
      b.push_back(8'h11); for (int i = 0; i < 16; i++) b.push_back(BITS_AC_C[i]);
      for (int i = 0; i < 162; i++) b.push_back(VALS_AC_C[i]);
      b = {b, '{8'hFF, 8'hDA, 8'h00, 8'h0C, 8'h03, 8'h01, 8'h00, 8'h02, 8'h11, 8'h03, 8'h11,
                8'h00, 8'h3F, 8'h00}};
      return b;
    endfunction

    static function automatic int ref_size(int v);
      int a = (v < 0) ? -v : v;
      int s = 0;
      while (a != 0) begin a = a >> 1; s++; end
      return s;
    endfunction

    // Encode one 8x8 block of quantized coefficients (zig-zag order).
    static function automatic void ref_code_block(bitwriter bw, int zq[64], int comp,
                                           ref_ht_t dc_l, ref_ht_t dc_c, ref_ht_t ac_l, ref_ht_t ac_c);
      bit chroma = (comp != 0);
      int diff = zq[0] - bw.pred[comp];
      int s = ref_size(diff);
      int run = 0;
      ref_ht_t dct = chroma ? dc_c : dc_l;
      ref_ht_t act = chroma ? ac_c : ac_l;
      bw.pred[comp] = zq[0];
      bw.put(dct.code[s], dct.len[s]);
      if (s > 0) bw.put((diff < 0) ? diff - 1 : diff, s);
      for (int j = 1; j < 64; j++) begin
        if (zq[j] == 0) run++;
        else begin
          while (run >= 16) begin bw.put(act.code[8'hF0], act.len[8'hF0]); run -= 16; bw.zrl++; end
          s = ref_size(zq[j]);
          bw.put(act.code[run*16+s], act.len[run*16+s]);
          bw.put((zq[j] < 0) ? zq[j] - 1 : zq[j], s);
          run = 0;
        end
      end
      if (run > 0) begin bw.put(act.code[0], act.len[0]); bw.eob++; end
      bw.blocks++;
    endfunction

    // Full JPEG file of a w x h image, pix[y*w+x] = {R,G,B}
    // stats: ZRL codes, EOB codes, stuffed bytes, blocks
    static function automatic bq_t ref_encode(logic [23:0] pix [], int w, int h, logic [7:0] q[64],
                                       output int stats[4]);
      bitwriter bw = new();
      ref_ht_t dc_l = ref_table(BITS_DC_L, VALS_DC);
      ref_ht_t dc_c = ref_table(BITS_DC_C, VALS_DC);
      ref_ht_t ac_l = ref_table(BITS_AC_L, VALS_AC_L);
      ref_ht_t ac_c = ref_table(BITS_AC_C, VALS_AC_C);
      bq_t out = ref_header(q, w, h);
      for (int sy = 0; sy < h / 8; sy++)
        for (int m = 0; m < w / 16; m++)
          for (int b = 0; b < 4; b++) begin
            blk_t f, F;
            int zq[64];
            int comp = (b < 2) ? 0 : b - 1;
            for (int r = 0; r < 8; r++)
              for (int c = 0; c < 8; c++) begin
                int y = sy*8 + r;
                int x0 = (b < 2) ? m*16 + b*8 + c : m*16 + 2*c;
                int x1 = (b < 2) ? x0 : x0 + 1;
                logic [23:0] p0 = pix[y*w + x0];
                logic [23:0] p1 = pix[y*w + x1];
                f[r*8+c] = ref_color(comp, p0[23:16], p0[15:8], p0[7:0], p1[23:16], p1[15:8], p1[7:0]);
              end
            F = ref_dct2(f);
            for (int j = 0; j < 64; j++) zq[j] = ref_quant(F[ZZ_RASTER[j]], q[j]);
            ref_code_block(bw, zq, comp, dc_l, dc_c, ac_l, ac_c);
          end
      bw.pad();
      stats = '{bw.zrl, bw.eob, bw.stuffs, bw.blocks};
      out = {out, bw.bytes, 8'hFF, 8'hD9};
      return out;
    endfunction

  endclass

endpackage
