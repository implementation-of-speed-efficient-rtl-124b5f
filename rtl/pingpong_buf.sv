// pingpong_buf: two-bank 8x8 block buffer (ping-pong memory).
//
// Samples are written in arrival order into one 64-word bank while the other
// bank, once complete, is read out, so writing block n+1 overlaps reading
// block n and a steady stream passes at one sample per cycle. The read order
// is set by ORDER: RD_LINEAR reads index i, RD_TRANSPOSE reads
// (i%8)*8 + i/8, which turns a row-by-row block into a column-by-column one.
// When USE_RD_ADDR is set the word address comes from rd_addr instead,
// computed by the owner from rd_idx (the index 0..63 of the next read); the
// zig-zag unit uses this with its reorder ROM.
// Both sides use valid/ready. in_ready is low while the bank being written
// still holds an unread block. Read data is registered: the first word of a
// block leaves one cycle after its last word was written.
// Ping-pong buffering between stages follows the design; bank size and the
// handshake are choices of this implementation.
module pingpong_buf import jpeg_pkg::*; #(
  parameter int        W           = 12,
  parameter rd_order_e ORDER       = RD_LINEAR,
  parameter bit        USE_RD_ADDR = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic [5:0]   rd_idx,
  input  logic [5:0]   rd_addr,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);

  logic [W-1:0] mem [128];
  logic         wbank, rbank;
  logic [5:0]   wcnt, rcnt;
  logic [1:0]   full;
  logic [5:0]   raddr;
  logic         rd;

  assign in_ready = !full[wbank];
  assign rd_idx   = rcnt;
  assign rd       = full[rbank] && (!out_valid || out_ready);

  always_comb begin
    if (USE_RD_ADDR)                raddr = rd_addr;
    else if (ORDER == RD_TRANSPOSE) raddr = {rcnt[2:0], rcnt[5:3]};
    else                            raddr = rcnt;
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[{wbank, wcnt}] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank     <= 1'b0;
      rbank     <= 1'b0;
      wcnt      <= '0;
      rcnt      <= '0;
      full      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (in_valid && in_ready) begin
        wcnt <= wcnt + 6'd1;
        if (wcnt == 6'd63) begin
          full[wbank] <= 1'b1;
          wbank       <= !wbank;
        end
      end
      if (rd) begin
        out_data  <= mem[{rbank, raddr}];
        out_valid <= 1'b1;
        rcnt      <= rcnt + 6'd1;
        if (rcnt == 6'd63) begin
          full[rbank] <= 1'b0;
          rbank       <= !rbank;
        end
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule
