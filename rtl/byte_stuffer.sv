// byte_stuffer: packs Huffman bit chunks into bytes, with JPEG byte stuffing.
//
// Chunks (up to 32 bits, right aligned, MSB first) are appended to a 64-bit
// bit buffer whenever it holds at most 32 bits. One byte per cycle leaves
// the buffer once 8 bits are present; after every 0xFF data byte a 0x00 is
// inserted so that a decoder cannot mistake it for a marker. When flush is
// high and no chunk is waiting, a last partial byte is padded with 1 bits.
// empty is high when no bit and no byte is left inside.
// Byte stuffing follows the design; buffer size and padding rule (that of
// the JPEG standard) are this implementation's.
module byte_stuffer import jpeg_pkg::*; (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  input  logic       in_valid,
  output logic       in_ready,
  input  vlc_t       in_vlc,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_data,
  output logic       empty
);

  logic [63:0] buf_q;
  logic [6:0]  cnt;
  logic        stuff_pend;
  logic        can_out, take;
  logic [7:0]  full_byte, pad_byte;

  assign in_ready  = (cnt <= 7'd32);
  assign take      = in_valid && in_ready;
  assign can_out   = !out_valid || out_ready;
  assign full_byte = 8'(buf_q >> (cnt - 7'd8));
  assign pad_byte  = 8'((buf_q << (7'd8 - cnt)) | ((64'd1 << (7'd8 - cnt)) - 64'd1));
  assign empty     = (cnt == 7'd0) && !stuff_pend && !out_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q      <= '0;
      cnt        <= '0;
      stuff_pend <= 1'b0;
      out_valid  <= 1'b0;
      out_data   <= '0;
    end else begin
      logic [6:0] c;
      c = cnt;
      if (can_out) begin
        if (stuff_pend) begin
          out_data   <= 8'h00;
          out_valid  <= 1'b1;
          stuff_pend <= 1'b0;
        end else if (cnt >= 7'd8) begin
          out_data   <= full_byte;
          out_valid  <= 1'b1;
          stuff_pend <= (full_byte == 8'hFF);
          c          = cnt - 7'd8;
        end else if (flush && !in_valid && cnt != 7'd0) begin
          out_data   <= pad_byte;
          out_valid  <= 1'b1;
          stuff_pend <= (pad_byte == 8'hFF);
          c          = 7'd0;
        end else begin
          out_valid  <= 1'b0;
        end
      end
      if (take) begin
        buf_q <= (buf_q << in_vlc.len) | 64'(in_vlc.bits);
        c     = c + 7'(in_vlc.len);
      end
      cnt <= c;
    end
  end

endmodule
