// jpeg_pkg: types, constants and constant tables shared by the JPEG encoder.
//
// Holds the fixed-point DCT basis (cosines scaled by 2^12), the zig-zag
// reorder table, the four baseline Huffman tables of ITU-T T.81 Annex K
// (lists of code counts per length and symbol values, from which the code
// words are derived by the canonical Huffman rule), the default quantization
// table, and the 623-byte JFIF header template with the offsets of the fields
// a host may change. The stream structs passed between pipeline stages are
// declared here too.
package jpeg_pkg;

  // ---------------------------------------------------------------- widths
  localparam int PIX_W   = 8;   // bits per colour component
  localparam int COEF_W  = 12;  // signed DCT / quantized coefficient width
  localparam int COS_FRAC = 12; // fractional bits of the DCT basis

  // Read order of a ping-pong block buffer (written in arrival order).
  typedef enum logic [1:0] {RD_LINEAR = 2'd0, RD_TRANSPOSE = 2'd1} rd_order_e;

  typedef enum logic [1:0] {COMP_Y = 2'd0, COMP_CB = 2'd1, COMP_CR = 2'd2} comp_e;

  // One read of the line buffer: a component selector and a pair of
  // horizontally adjacent RGB pixels (pb is only used for Cb / Cr).
  typedef struct packed {
    comp_e       comp;
    logic [23:0] pa;
    logic [23:0] pb;
  } pix_pair_t;

  // Output of the run-length coder, input of the Huffman coder.
  typedef struct packed {
    logic              is_dc;   // DC difference (category + amplitude)
    logic              is_eob;  // end-of-block code (run/size 0/0)
    logic              chroma;  // 1: chrominance tables
    logic [1:0]        zrl;     // number of ZRL (16 zeros) codes to send first
    logic [3:0]        run;     // zero run before val (AC only)
    logic signed [COEF_W-1:0] val;
    logic              blk_end; // last symbol of an 8x8 block
  } rle_sym_t;

  // Variable length bit chunk, right aligned, sent MSB first.
  typedef struct packed {
    logic [31:0] bits;
    logic [5:0]  len;
    logic        blk_end;
  } vlc_t;

  // ------------------------------------------------------------- DCT basis
  // round(2048*cos(m*pi/16)) for m = 0..8
  function automatic int cos16(int m);
    int t[9] = '{2048, 2009, 1892, 1703, 1448, 1138, 784, 400, 0};
    int mm = m % 32;
    if (mm <= 8)       return t[mm];
    else if (mm <= 16) return -t[16-mm];
    else if (mm <= 24) return -t[mm-16];
    else               return t[32-mm];
  endfunction

  // 8-point DCT basis c(k)/2*cos((2n+1)k*pi/16), scaled by 2^COS_FRAC
  function automatic int dct_coef(int k, int n);
    if (k == 0) return 1448;
    return cos16((2*n+1)*k);
  endfunction

  // ---------------------------------------------------------------- zig-zag
  // raster index (row*8+col) of the j-th coefficient in zig-zag order
  localparam logic [5:0] ZZ_RASTER [64] = '{
     0,  1,  8, 16,  9,  2,  3, 10, 17, 24, 32, 25, 18, 11,  4,  5,
    12, 19, 26, 33, 40, 48, 41, 34, 27, 20, 13,  6,  7, 14, 21, 28,
    35, 42, 49, 56, 57, 50, 43, 36, 29, 22, 15, 23, 30, 37, 44, 51,
    58, 59, 52, 45, 38, 31, 39, 46, 53, 60, 61, 54, 47, 55, 62, 63};

  // -------------------------------------------------- quantization default
  // Annex K luminance table, listed in zig-zag order
  typedef logic [7:0] qtab_t [64];
  function automatic qtab_t default_qtab();
    logic [7:0] raster [64] = '{
      16, 11, 10, 16,  24,  40,  51,  61,
      12, 12, 14, 19,  26,  58,  60,  55,
      14, 13, 16, 24,  40,  57,  69,  56,
      14, 17, 22, 29,  51,  87,  80,  62,
      18, 22, 37, 56,  68, 109, 103,  77,
      24, 35, 55, 64,  81, 104, 113,  92,
      49, 64, 78, 87, 103, 121, 120, 101,
      72, 92, 95, 98, 112, 100, 103,  99};
    qtab_t q;
    for (int j = 0; j < 64; j++) q[j] = raster[ZZ_RASTER[j]];
    return q;
  endfunction
  localparam qtab_t DEFAULT_QTAB = default_qtab();

  // --------------------------------------------------------- Huffman tables
  typedef logic [7:0] bits_t [16];
  typedef logic [7:0] vals_t [162];

  localparam bits_t BITS_DC_L = '{0,1,5,1,1,1,1,1,1,0,0,0,0,0,0,0};
  localparam bits_t BITS_DC_C = '{0,3,1,1,1,1,1,1,1,1,1,0,0,0,0,0};
  localparam bits_t BITS_AC_L = '{0,2,1,3,3,2,4,3,5,5,4,4,0,0,1,8'h7d};
  localparam bits_t BITS_AC_C = '{0,2,1,2,4,4,3,4,7,5,4,4,0,1,2,8'h77};

  function automatic vals_t dc_vals();
    vals_t v;
    for (int i = 0; i < 162; i++) v[i] = (i < 12) ? 8'(i) : 8'h00;
    return v;
  endfunction
  localparam vals_t VALS_DC = dc_vals();

  localparam vals_t VALS_AC_L = '{
    8'h01,8'h02,8'h03,8'h00,8'h04,8'h11,8'h05,8'h12,8'h21,8'h31,8'h41,8'h06,8'h13,8'h51,8'h61,8'h07,
    8'h22,8'h71,8'h14,8'h32,8'h81,8'h91,8'ha1,8'h08,8'h23,8'h42,8'hb1,8'hc1,8'h15,8'h52,8'hd1,8'hf0,
    8'h24,8'h33,8'h62,8'h72,8'h82,8'h09,8'h0a,8'h16,8'h17,8'h18,8'h19,8'h1a,8'h25,8'h26,8'h27,8'h28,
    8'h29,8'h2a,8'h34,8'h35,8'h36,8'h37,8'h38,8'h39,8'h3a,8'h43,8'h44,8'h45,8'h46,8'h47,8'h48,8'h49,
    8'h4a,8'h53,8'h54,8'h55,8'h56,8'h57,8'h58,8'h59,8'h5a,8'h63,8'h64,8'h65,8'h66,8'h67,8'h68,8'h69,
    8'h6a,8'h73,8'h74,8'h75,8'h76,8'h77,8'h78,8'h79,8'h7a,8'h83,8'h84,8'h85,8'h86,8'h87,8'h88,8'h89,
    8'h8a,8'h92,8'h93,8'h94,8'h95,8'h96,8'h97,8'h98,8'h99,8'h9a,8'ha2,8'ha3,8'ha4,8'ha5,8'ha6,8'ha7,
    8'ha8,8'ha9,8'haa,8'hb2,8'hb3,8'hb4,8'hb5,8'hb6,8'hb7,8'hb8,8'hb9,8'hba,8'hc2,8'hc3,8'hc4,8'hc5,
    8'hc6,8'hc7,8'hc8,8'hc9,8'hca,8'hd2,8'hd3,8'hd4,8'hd5,8'hd6,8'hd7,8'hd8,8'hd9,8'hda,8'he1,8'he2,
    8'he3,8'he4,8'he5,8'he6,8'he7,8'he8,8'he9,8'hea,8'hf1,8'hf2,8'hf3,8'hf4,8'hf5,8'hf6,8'hf7,8'hf8,
    8'hf9,8'hfa};

  localparam vals_t VALS_AC_C = '{
    8'h00,8'h01,8'h02,8'h03,8'h11,8'h04,8'h05,8'h21,8'h31,8'h06,8'h12,8'h41,8'h51,8'h07,8'h61,8'h71,
    8'h13,8'h22,8'h32,8'h81,8'h08,8'h14,8'h42,8'h91,8'ha1,8'hb1,8'hc1,8'h09,8'h23,8'h33,8'h52,8'hf0,
    8'h15,8'h62,8'h72,8'hd1,8'h0a,8'h16,8'h24,8'h34,8'he1,8'h25,8'hf1,8'h17,8'h18,8'h19,8'h1a,8'h26,
    8'h27,8'h28,8'h29,8'h2a,8'h35,8'h36,8'h37,8'h38,8'h39,8'h3a,8'h43,8'h44,8'h45,8'h46,8'h47,8'h48,
    8'h49,8'h4a,8'h53,8'h54,8'h55,8'h56,8'h57,8'h58,8'h59,8'h5a,8'h63,8'h64,8'h65,8'h66,8'h67,8'h68,
    8'h69,8'h6a,8'h73,8'h74,8'h75,8'h76,8'h77,8'h78,8'h79,8'h7a,8'h82,8'h83,8'h84,8'h85,8'h86,8'h87,
    8'h88,8'h89,8'h8a,8'h92,8'h93,8'h94,8'h95,8'h96,8'h97,8'h98,8'h99,8'h9a,8'ha2,8'ha3,8'ha4,8'ha5,
    8'ha6,8'ha7,8'ha8,8'ha9,8'haa,8'hb2,8'hb3,8'hb4,8'hb5,8'hb6,8'hb7,8'hb8,8'hb9,8'hba,8'hc2,8'hc3,
    8'hc4,8'hc5,8'hc6,8'hc7,8'hc8,8'hc9,8'hca,8'hd2,8'hd3,8'hd4,8'hd5,8'hd6,8'hd7,8'hd8,8'hd9,8'hda,
    8'he2,8'he3,8'he4,8'he5,8'he6,8'he7,8'he8,8'he9,8'hea,8'hf2,8'hf3,8'hf4,8'hf5,8'hf6,8'hf7,8'hf8,
    8'hf9,8'hfa};

  // Canonical Huffman code words (T.81 Annex C), indexed by symbol value.
  typedef struct packed {
    logic [15:0] code;
    logic [4:0]  len;   // 0: symbol not in the table
  } hcode_t;
  typedef logic [20:0] htab_t [256];  // {code, len} per symbol

  function automatic htab_t gen_htab(bits_t bits, vals_t vals);
    htab_t t;
    int code = 0;
    int k = 0;
    for (int i = 0; i < 256; i++) t[i] = '0;
    for (int l = 1; l <= 16; l++) begin
      for (int i = 0; i < int'(bits[l-1]); i++) begin
        t[vals[k]] = {code[15:0], l[4:0]};
        k++;
        code++;
      end
      code = code << 1;
    end
    return t;
  endfunction

  localparam htab_t HT_DC_L = gen_htab(BITS_DC_L, VALS_DC);
  localparam htab_t HT_DC_C = gen_htab(BITS_DC_C, VALS_DC);
  localparam htab_t HT_AC_L = gen_htab(BITS_AC_L, VALS_AC_L);
  localparam htab_t HT_AC_C = gen_htab(BITS_AC_C, VALS_AC_C);

  // Magnitude category of a signed value (number of amplitude bits).
  function automatic logic [3:0] mag_size(logic signed [COEF_W-1:0] v);
    logic [COEF_W-1:0] a;
    a = v[COEF_W-1] ? COEF_W'(-v) : COEF_W'(v);
    mag_size = 4'd0;
    for (int b = 0; b < COEF_W; b++) if (a[b]) mag_size = 4'(b + 1);
  endfunction

  // ------------------------------------------------------ JFIF header image
  // 623 bytes: SOI, APP0 (JFIF 1.01), two DQT segments (8-bit tables 0
  // and 1, both holding the quantizer's one table), SOF0 (3 components,
  // Y 2x1 with table 0, Cb 1x1 and Cr 1x1 with table 1 = 4:2:2), four DHT
  // segments (DC/AC luminance, DC/AC chrominance), SOS. The host fills in
  // the tables, height and width.
  localparam int HDR_LEN      = 623;
  localparam int HDR_DQT_TAB  = 25;   // first of the 64 bytes of table 0
  localparam int HDR_DQT_TAB1 = 94;   // first of the 64 bytes of table 1
  localparam int HDR_SOF_H    = 163;  // height MSB, LSB
  localparam int HDR_SOF_W    = 165;  // width MSB, LSB

  typedef logic [7:0] hdr_t [HDR_LEN];

  function automatic hdr_t build_header(qtab_t q, int h, int w);
    hdr_t  b;
    logic [9:0] p = '0;
    logic [7:0] app0 [18] = '{8'hFF,8'hE0,8'h00,8'h10,8'h4A,8'h46,8'h49,8'h46,8'h00,
                              8'h01,8'h01,8'h00,8'h00,8'h01,8'h00,8'h01,8'h00,8'h00};
    logic [7:0] sof [19]  = '{8'hFF,8'hC0,8'h00,8'h11,8'h08,8'h00,8'h00,8'h00,8'h00,8'h03,
                              8'h01,8'h21,8'h00, 8'h02,8'h11,8'h01, 8'h03,8'h11,8'h01};
    logic [7:0] sos [14]  = '{8'hFF,8'hDA,8'h00,8'h0C,8'h03,8'h01,8'h00,8'h02,8'h11,
                              8'h03,8'h11,8'h00,8'h3F,8'h00};
    b[p++] = 8'hFF; b[p++] = 8'hD8;
    for (int i = 0; i < 18; i++) b[p++] = app0[i];
    for (int t = 0; t < 2; t++) begin
      b[p++] = 8'hFF; b[p++] = 8'hDB; b[p++] = 8'h00; b[p++] = 8'h43; b[p++] = 8'(t);
      for (int i = 0; i < 64; i++) b[p++] = q[i];
    end
    sof[5] = 8'(h >> 8); sof[6] = 8'(h); sof[7] = 8'(w >> 8); sof[8] = 8'(w);
    for (int i = 0; i < 19; i++) b[p++] = sof[i];
    // one DHT segment per table: length 2+1+16+12 (DC) or 2+1+16+162 (AC)
    b[p++] = 8'hFF; b[p++] = 8'hC4; b[p++] = 8'h00; b[p++] = 8'h1F;
    b[p++] = 8'h00; for (int i = 0; i < 16; i++) b[p++] = BITS_DC_L[i];
    for (int i = 0; i < 12; i++) b[p++] = VALS_DC[i];
    b[p++] = 8'hFF; b[p++] = 8'hC4; b[p++] = 8'h00; b[p++] = 8'hB5;
    b[p++] = 8'h10; for (int i = 0; i < 16; i++) b[p++] = BITS_AC_L[i];
    for (int i = 0; i < 162; i++) b[p++] = VALS_AC_L[i];
    b[p++] = 8'hFF; b[p++] = 8'hC4; b[p++] = 8'h00; b[p++] = 8'h1F;
    b[p++] = 8'h01; for (int i = 0; i < 16; i++) b[p++] = BITS_DC_C[i];
    for (int i = 0; i < 12; i++) b[p++] = VALS_DC[i];
    b[p++] = 8'hFF; b[p++] = 8'hC4; b[p++] = 8'h00; b[p++] = 8'hB5;
    b[p++] = 8'h11; for (int i = 0; i < 16; i++) b[p++] = BITS_AC_C[i];
    for (int i = 0; i < 162; i++) b[p++] = VALS_AC_C[i];
    for (int i = 0; i < 14; i++) b[p++] = sos[i];
    return b;
  endfunction

  localparam hdr_t HDR_TEMPLATE = build_header(DEFAULT_QTAB, 480, 640);

endpackage
