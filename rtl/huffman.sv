// huffman: Huffman (variable length) coder for baseline JPEG symbols.
//
// Each run-length symbol becomes one bit chunk: the Huffman code of its
// category (DC) or run/size byte (AC), followed by the size amplitude bits
// (negative values as value-1, the JPEG convention). An AC symbol with
// zrl > 0 is preceded by that many ZRL codes (run/size F/0), one chunk per
// cycle, holding the input meanwhile. The code words are the canonical
// codes of the Annex K tables (luminance or chrominance), built at
// elaboration from the code-length lists in jpeg_pkg. Chunks are at most
// 16 + 11 = 27 bits, right aligned in vlc_t.bits.
// The symbols of a block pass a ping-pong buffer (pingpong_var, 1..64
// symbols per block): the run-length coder writes block n+1 while this
// coder reads block n.
// Timing: one chunk per cycle, registered (valid/ready on both sides); a
// block's first chunk leaves two cycles after its last symbol entered.
// Huffman coding and the ping-pong buffer follow the design; the tables
// are the standard ones, as the design gives no tables of its own.
module huffman import jpeg_pkg::*; (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clr,
  input  logic     in_valid,
  output logic     in_ready,
  input  rle_sym_t in_sym,
  output logic     out_valid,
  input  logic     out_ready,
  output vlc_t     out_vlc
);

  logic [1:0]  zsent;
  logic        can_out, zrl_now;
  logic [3:0]  size;
  logic [20:0] hc;
  logic [15:0] code;
  logic [4:0]  clen;
  logic [11:0] amp;
  logic [31:0] chunk;
  logic [5:0]  chunk_len;
  logic        b_valid, b_ready, b_last;
  rle_sym_t    b_sym;

  pingpong_var #(.W($bits(rle_sym_t)), .DEPTH(64)) u_buf (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(in_sym), .in_last(in_sym.blk_end),
    .out_valid(b_valid), .out_ready(b_ready), .out_data(b_sym), .out_last(b_last)
  );

  assign can_out = !out_valid || out_ready;
  assign zrl_now = (b_sym.zrl != zsent);
  assign b_ready = can_out && !zrl_now;

  always_comb begin
    size = b_sym.is_eob ? 4'd0 : mag_size(b_sym.val);
    if (zrl_now)
      hc = b_sym.chroma ? HT_AC_C[8'hF0] : HT_AC_L[8'hF0];
    else if (b_sym.is_dc)
      hc = b_sym.chroma ? HT_DC_C[{4'd0, size}] : HT_DC_L[{4'd0, size}];
    else
      hc = b_sym.chroma ? HT_AC_C[{b_sym.run, size}] : HT_AC_L[{b_sym.run, size}];
    code = hc[20:5];
    clen = hc[4:0];
    amp  = b_sym.val[COEF_W-1] ? 12'(b_sym.val - 1'b1) : 12'(b_sym.val);
    amp  = amp & ((12'd1 << size) - 12'd1);
    if (zrl_now) begin
      chunk     = 32'(code);
      chunk_len = 6'(clen);
    end else begin
      chunk     = (32'(code) << size) | 32'(amp);
      chunk_len = 6'(clen) + 6'(size);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      zsent     <= '0;
      out_valid <= 1'b0;
      out_vlc   <= '0;
    end else if (clr) begin
      zsent     <= '0;
      out_valid <= 1'b0;
    end else if (can_out) begin
      out_valid <= b_valid;
      if (b_valid) begin
        out_vlc.bits    <= chunk;
        out_vlc.len     <= chunk_len;
        out_vlc.blk_end <= !zrl_now && b_last;
        zsent           <= zrl_now ? zsent + 2'd1 : 2'd0;
      end
    end
  end

endmodule
