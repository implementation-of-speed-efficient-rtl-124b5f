// pingpong_var: two-bank buffer for blocks of variable length.
//
// Like pingpong_buf, one bank is written while the other is read, so the
// writer can produce block n+1 while the reader still consumes block n. A
// block here is a run of 1..DEPTH words ended by in_last (or by the
// DEPTH-th word). The bank keeps the index of its last word. The reader
// reads the bank in write order and flags that word with out_last. Between
// run-length coder and Huffman coder a block is 1..64 symbols (the DC
// symbol, then up to 63 AC symbols or an end-of-block).
// Both sides use valid/ready. in_ready is low while the bank being written
// still holds an unread block. Read data is registered: the first word of
// a block leaves one cycle after its last word was written.
// Ping-pong buffering in the entropy coder follows the design; the length
// register per bank and the handshake are choices of this implementation.
module pingpong_var #(
  parameter int W     = 32,
  parameter int DEPTH = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  input  logic         in_last,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data,
  output logic         out_last
);

  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [2*DEPTH];
  logic          wbank, rbank;
  logic [AW-1:0] wcnt, rcnt;
  logic [AW-1:0] last_idx [2];
  logic [1:0]    full;
  logic          wr, rd, wend, rend;

  assign in_ready = !full[wbank];
  assign wr       = in_valid && in_ready;
  assign wend     = in_last || (wcnt == AW'(DEPTH - 1));
  assign rd       = full[rbank] && (!out_valid || out_ready);
  assign rend     = (rcnt == last_idx[rbank]);

  always_ff @(posedge clk) begin
    if (wr) mem[{wbank, wcnt}] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank     <= 1'b0;
      rbank     <= 1'b0;
      wcnt      <= '0;
      rcnt      <= '0;
      full      <= '0;
      last_idx  <= '{default: '0};
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
    end else begin
      if (wr) begin
        if (wend) begin
          wcnt            <= '0;
          last_idx[wbank] <= wcnt;
          full[wbank]     <= 1'b1;
          wbank           <= !wbank;
        end else begin
          wcnt <= wcnt + 1'b1;
        end
      end
      if (rd) begin
        out_data  <= mem[{rbank, rcnt}];
        out_last  <= rend;
        out_valid <= 1'b1;
        if (rend) begin
          rcnt        <= '0;
          full[rbank] <= 1'b0;
          rbank       <= !rbank;
        end else begin
          rcnt <= rcnt + 1'b1;
        end
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule
