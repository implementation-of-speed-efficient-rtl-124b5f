// jpeg_ctrl: controller that sequences the encoding of one image.
//
// On start it clears the pipeline state (clr), asks the JFIF generator for
// the header (start_jfif, eoi = 0) and lets pixels in (busy). The pipeline
// stages then run on their own, each processing 8x8 blocks as they arrive;
// the controller counts finished blocks (blk_done: the last chunk of a
// block accepted by the byte stuffer). After (img_w/16)*(img_h/8)*4 blocks
// (4:2:2: two Y, one Cb, one Cr per 16x8 MCU) it raises flush until the
// byte stuffer is empty, then asks for the EOI marker (start_jfif, eoi = 1).
// done rises when the marker is out and stays high until the next start.
// A central controller for the block pipeline follows the design; its
// states and signals are this implementation's.
module jpeg_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] img_w,
  input  logic [15:0] img_h,
  output logic        clr,
  output logic        busy,
  output logic        done,
  output logic        start_jfif,
  output logic        eoi,
  input  logic        ready_jfif,
  input  logic        blk_done,
  output logic        flush,
  input  logic        stuffer_empty
);

  typedef enum logic [2:0] {C_IDLE, C_HDR, C_ENC, C_FLUSH, C_EOI} cstate_e;
  cstate_e     st;
  logic [19:0] blocks, total;

  assign total = 20'(img_w[15:4]) * 20'(img_h[15:3]) * 20'd4;
  assign busy  = (st != C_IDLE);
  assign flush = (st == C_FLUSH);
  assign clr   = (st == C_IDLE) && start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= C_IDLE;
      blocks     <= '0;
      done       <= 1'b0;
      start_jfif <= 1'b0;
      eoi        <= 1'b0;
    end else begin
      start_jfif <= 1'b0;
      if (blk_done) blocks <= blocks + 20'd1;
      case (st)
        C_IDLE: if (start) begin
          st         <= C_HDR;
          blocks     <= '0;
          done       <= 1'b0;
          start_jfif <= 1'b1;
          eoi        <= 1'b0;
        end
        C_HDR:   if (ready_jfif) st <= C_ENC;
        C_ENC:   if (blocks == total) st <= C_FLUSH;
        C_FLUSH: if (stuffer_empty) begin
          st         <= C_EOI;
          start_jfif <= 1'b1;
          eoi        <= 1'b1;
        end
        C_EOI: if (ready_jfif) begin
          st   <= C_IDLE;
          done <= 1'b1;
        end
        default: st <= C_IDLE;
      endcase
    end
  end

endmodule
