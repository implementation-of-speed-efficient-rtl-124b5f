// buf_fifo: input line buffer between the host and the encoding pipeline.
//
// The host writes the image line by line, one RGB pixel ({R,G,B}, 8 bits
// each) per write (pix_we while pix_ready). PIXEL_COUNT counts the writes in
// a line and returns to zero at the end of each line. The RAM holds two
// stripes of eight lines (ping-pong): while one stripe is filled, the other
// is read out as 8x8 blocks, left to right. Each 16x8 MCU of a 4:2:2 image
// is read as four blocks: Y of the left 8x8, Y of the right 8x8, then Cb and
// Cr over all 16x8, where each read returns a horizontal pixel pair for
// averaging. Every read gives a pix_pair_t (component, pixel a, pixel b)
// in block raster order: 256 reads per MCU, one per cycle.
// fifo_full stops the host when both stripes are in use; fifo_almost_full
// warns one line earlier. Pixels are stored as even/odd halves so that a
// pair comes out of one read. img_w must be a multiple of 16 and img_h of
// 8, up to IMG_W_MAX and the image line count. clr restarts an image.
// Line-by-line writing, the pixel counter and left-to-right, top-to-bottom
// block reading follow the design; the two-stripe size and the pair read
// are this implementation's.
module buf_fifo import jpeg_pkg::*; #(
  parameter int IMG_W_MAX = 640
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic        enable,
  input  logic [15:0] img_w,
  input  logic [15:0] img_h,
  input  logic        pix_we,
  input  logic [23:0] pix_data,
  output logic        pix_ready,
  output logic        fifo_full,
  output logic        fifo_almost_full,
  output logic [15:0] pixel_count,
  output logic        out_valid,
  input  logic        out_ready,
  output pix_pair_t   out_pair
);

  localparam int PW    = IMG_W_MAX / 2;           // pair words per line
  localparam int DEPTH = 16 * PW;
  localparam int AW    = $clog2(DEPTH);
  localparam int XW    = $clog2(PW);

  logic [23:0] ram_e [DEPTH];   // even pixels
  logic [23:0] ram_o [DEPTH];   // odd pixels

  // write side
  logic        wbank;
  logic [2:0]  wline;
  logic [15:0] wy;
  logic [1:0]  bank_full;
  logic        wr;
  logic [AW-1:0] waddr;

  assign fifo_full        = bank_full[wbank] || (wy == img_h);
  assign fifo_almost_full = bank_full[!wbank] && (wline == 3'd7);
  assign pix_ready        = enable && !fifo_full;
  assign wr               = pix_we && pix_ready;
  assign waddr            = AW'({wbank, wline} * PW + int'(pixel_count[15:1]));

  always_ff @(posedge clk) begin
    if (wr) begin
      if (pixel_count[0]) ram_o[waddr] <= pix_data;
      else                ram_e[waddr] <= pix_data;
    end
  end

  // read side
  logic          rbank;
  logic [15:0]   mcu;          // MCU index within the stripe
  logic [1:0]    ph;           // 0: Y left, 1: Y right, 2: Cb, 3: Cr
  logic [2:0]    rr, rc;       // row, column within the block
  logic          rd, last_rd;
  logic [XW-1:0] px;
  logic [AW-1:0] raddr;
  logic [15:0]   mcus;

  assign mcus    = img_w >> 4;
  assign rd      = bank_full[rbank] && (!out_valid || out_ready);
  assign last_rd = (mcu == mcus - 16'd1) && (ph == 2'd3) && (rr == 3'd7) && (rc == 3'd7);

  always_comb begin
    case (ph)
      2'd0:    px = XW'(int'(mcu) * 8 + int'(rc[2:1]));
      2'd1:    px = XW'(int'(mcu) * 8 + 4 + int'(rc[2:1]));
      default: px = XW'(int'(mcu) * 8 + int'(rc));
    endcase
    raddr = AW'({rbank, rr} * PW + int'(px));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank <= 1'b0; wline <= '0; wy <= '0; pixel_count <= '0;
      bank_full <= '0;
      rbank <= 1'b0; mcu <= '0; ph <= '0; rr <= '0; rc <= '0;
      out_valid <= 1'b0;
      out_pair  <= '0;
    end else if (clr) begin
      wbank <= 1'b0; wline <= '0; wy <= '0; pixel_count <= '0;
      bank_full <= '0;
      rbank <= 1'b0; mcu <= '0; ph <= '0; rr <= '0; rc <= '0;
      out_valid <= 1'b0;
    end else begin
      if (wr) begin
        if (pixel_count == img_w - 16'd1) begin
          pixel_count <= '0;
          wline       <= wline + 3'd1;
          wy          <= wy + 16'd1;
          if (wline == 3'd7) begin
            bank_full[wbank] <= 1'b1;
            wbank            <= !wbank;
          end
        end else begin
          pixel_count <= pixel_count + 16'd1;
        end
      end
      if (rd) begin
        out_valid <= 1'b1;
        case (ph)
          2'd0, 2'd1: begin
            out_pair.comp <= COMP_Y;
            out_pair.pa   <= rc[0] ? ram_o[raddr] : ram_e[raddr];
            out_pair.pb   <= rc[0] ? ram_o[raddr] : ram_e[raddr];
          end
          default: begin
            out_pair.comp <= (ph == 2'd2) ? COMP_CB : COMP_CR;
            out_pair.pa   <= ram_e[raddr];
            out_pair.pb   <= ram_o[raddr];
          end
        endcase
        rc <= rc + 3'd1;
        if (rc == 3'd7) begin
          rr <= rr + 3'd1;
          if (rr == 3'd7) begin
            ph <= ph + 2'd1;
            if (ph == 2'd3) mcu <= mcu + 16'd1;
          end
        end
        if (last_rd) begin
          mcu              <= '0;
          bank_full[rbank] <= 1'b0;
          rbank            <= !rbank;
        end
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule
