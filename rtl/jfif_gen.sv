// jfif_gen: JFIF generator and EOI writer; sole writer of the output stream.
//
// start_jfif with eoi = 0: a read counter runs over 0..HDR_LEN-1 through
// the header RAM and every byte is sent to the output, then ready_jfif
// pulses and the generator passes the byte-stuffed scan data through.
// start_jfif with eoi = 1: the EOI marker FF D9 is appended to close the
// image, then ready_jfif pulses again.
// The output is a byte stream (out_valid/out_ready) with out_addr, the byte
// offset in the JPEG file, so it can be written directly into an output RAM.
// The header RAM has one cycle of read latency; its output holds while no
// read is issued, so a stalled output loses nothing.
// The start_jfif/eoi/ready_jfif protocol and the header copy follow the
// design, as does the header length of 623 bytes (read counter 0..622).
module jfif_gen import jpeg_pkg::*; (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start_jfif,
  input  logic        eoi,
  output logic        ready_jfif,
  output logic        hdr_rd_en,
  output logic [10:0] hdr_rd_addr,
  input  logic [7:0]  hdr_rd_data,
  input  logic        scan_valid,
  output logic        scan_ready,
  input  logic [7:0]  scan_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data,
  output logic [23:0] out_addr
);

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_SCAN, S_EOI0, S_EOI1} state_e;
  state_e      st;
  logic [10:0] rd_cnt;
  logic        pend;       // header RAM output holds an unsent byte
  logic        consume;

  assign consume = out_valid && out_ready;

  always_comb begin
    out_valid  = 1'b0;
    out_data   = 8'h00;
    scan_ready = 1'b0;
    case (st)
      S_HDR:  begin out_valid = pend; out_data = hdr_rd_data; end
      S_SCAN: begin out_valid = scan_valid; out_data = scan_data; scan_ready = out_ready; end
      S_EOI0: begin out_valid = 1'b1; out_data = 8'hFF; end
      S_EOI1: begin out_valid = 1'b1; out_data = 8'hD9; end
      default: ;
    endcase
    hdr_rd_addr = rd_cnt;
    hdr_rd_en   = (st == S_HDR) && (!pend || consume) && (rd_cnt != 11'(HDR_LEN));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= S_IDLE;
      rd_cnt     <= '0;
      pend       <= 1'b0;
      ready_jfif <= 1'b0;
      out_addr   <= '0;
    end else begin
      ready_jfif <= 1'b0;
      if (consume) out_addr <= out_addr + 24'd1;
      case (st)
        S_IDLE: if (start_jfif && !eoi) begin
          st       <= S_HDR;
          rd_cnt   <= '0;
          pend     <= 1'b0;
          out_addr <= '0;
        end
        S_HDR: begin
          if (hdr_rd_en) begin
            rd_cnt <= rd_cnt + 11'd1;
            pend   <= 1'b1;
          end else if (consume) begin
            pend <= 1'b0;
            if (rd_cnt == 11'(HDR_LEN)) begin
              st         <= S_SCAN;
              ready_jfif <= 1'b1;
            end
          end
        end
        S_SCAN: if (start_jfif && eoi) st <= S_EOI0;
        S_EOI0: if (out_ready) st <= S_EOI1;
        S_EOI1: if (out_ready) begin
          st         <= S_IDLE;
          ready_jfif <= 1'b1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
