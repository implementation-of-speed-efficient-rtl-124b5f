// rle: run-length coding of a zig-zag ordered, quantized block stream.
//
// The first coefficient of each block is the DC term: its difference from
// the previous DC of the same component is sent (is_dc). Each following
// non-zero AC coefficient is sent with the count of zeros before it: run =
// count mod 16 and zrl = count / 16, the number of "16 zeros" (ZRL) codes
// the Huffman coder must send first. If the block ends in zeros an
// end-of-block symbol closes it. Blocks come in the 4:2:2 MCU order Y, Y,
// Cb, Cr; a block counter gives the component and the table (chroma). clr
// (start of an image) resets the DC predictors and counters.
// The input passes a ping-pong block buffer (pingpong_buf): the quantizer
// writes block n+1 while the coder reads block n. The coder takes one
// coefficient per cycle; each produces at most one symbol, one cycle later
// (valid/ready, stalls with the output). A block's first symbol leaves two
// cycles after its last coefficient entered.
// Zero-run coding, DC/AC separation and the ping-pong buffer follow the
// design; the symbol format is this implementation's.
module rle import jpeg_pkg::*; (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [COEF_W-1:0] in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output rle_sym_t                 out_sym
);

  logic [5:0]              j;
  logic [1:0]              blk;
  logic [5:0]              zcnt;
  logic signed [COEF_W-1:0] pred [3];
  comp_e                   comp;
  logic                    take;
  logic                    b_valid, b_ready;
  logic signed [COEF_W-1:0] b_data;
  logic [5:0]              b_idx;

  pingpong_buf #(.W(COEF_W), .ORDER(RD_LINEAR)) u_buf (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(in_data),
    .rd_idx(b_idx), .rd_addr(b_idx),
    .out_valid(b_valid), .out_ready(b_ready), .out_data(b_data)
  );

  assign b_ready = !out_valid || out_ready;
  assign take    = b_valid && b_ready;

  always_comb begin
    case (blk)
      2'd2:    comp = COMP_CB;
      2'd3:    comp = COMP_CR;
      default: comp = COMP_Y;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      j <= '0; blk <= '0; zcnt <= '0;
      for (int c = 0; c < 3; c++) pred[c] <= '0;
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else if (clr) begin
      j <= '0; blk <= '0; zcnt <= '0;
      for (int c = 0; c < 3; c++) pred[c] <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_ready) out_valid <= 1'b0;
      if (take) begin
        j <= j + 6'd1;
        if (j == 6'd63) blk <= blk + 2'd1;
        out_sym         <= '0;
        out_sym.chroma  <= (comp != COMP_Y);
        if (j == 6'd0) begin
          out_sym.is_dc <= 1'b1;
          out_sym.val   <= b_data - pred[comp];
          pred[comp]    <= b_data;
          out_valid     <= 1'b1;
          zcnt          <= '0;
        end else if (b_data != '0) begin
          out_sym.run     <= zcnt[3:0];
          out_sym.zrl     <= zcnt[5:4];
          out_sym.val     <= b_data;
          out_sym.blk_end <= (j == 6'd63);
          out_valid       <= 1'b1;
          zcnt            <= '0;
        end else if (j == 6'd63) begin
          out_sym.is_eob  <= 1'b1;
          out_sym.blk_end <= 1'b1;
          out_valid       <= 1'b1;
          zcnt            <= '0;
        end else begin
          zcnt <= zcnt + 6'd1;
        end
      end
    end
  end

endmodule
