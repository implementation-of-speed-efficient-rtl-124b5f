// host_if: register interface between the host CPU and the encoder.
//
// Single-cycle write bus (host_we, host_addr, host_wdata) and combinational
// read (host_rdata). Register map (word addresses):
//   0x00 CTRL    write bit 0 = 1: start encoding one image
//   0x01 STATUS  read: bit 0 busy, bit 1 done (image finished)
//   0x02 IMG_W   image width in pixels (multiple of 16, <= 640)
//   0x03 IMG_H   image height in lines (multiple of 8, <= 480)
//   0x40..0x7F   quantization table entry addr-0x40, zig-zag order, 8 bits
// Image size and quantization writes are also copied into the configurable
// fields of the JFIF header RAM (SOF0 height/width, DQT tables 0 and 1).
// Each such write needs two header bytes (MSB and LSB of a size, or the
// entry in both DQT tables): the second is written the next cycle and
// host_wait is high for that cycle; the host holds its next write while
// host_wait is high.
// An interface through which the host programs the header fields follows
// the design; the register map is this implementation's.
module host_if import jpeg_pkg::*; #(
  parameter int IMG_W_MAX = 640,
  parameter int IMG_H_MAX = 480
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        host_we,
  input  logic [7:0]  host_addr,
  input  logic [15:0] host_wdata,
  output logic [15:0] host_rdata,
  output logic        host_wait,
  input  logic        busy,
  input  logic        done,
  output logic        start,
  output logic [15:0] img_w,
  output logic [15:0] img_h,
  output logic        q_we,
  output logic [5:0]  q_addr,
  output logic [7:0]  q_data,
  output logic        hdr_we,
  output logic [10:0] hdr_addr,
  output logic [7:0]  hdr_data
);

  localparam logic [7:0] A_CTRL = 8'h00, A_STATUS = 8'h01, A_W = 8'h02, A_H = 8'h03;

  logic        second;        // second header byte pending
  logic [10:0] second_addr;
  logic [7:0]  second_data;
  logic        wr;

  assign host_wait = second;
  assign wr        = host_we && !second;

  always_comb begin
    case (host_addr)
      A_STATUS: host_rdata = {14'd0, done, busy};
      A_W:      host_rdata = img_w;
      A_H:      host_rdata = img_h;
      default:  host_rdata = 16'd0;
    endcase
    q_we     = wr && (host_addr[7:6] == 2'b01);
    q_addr   = host_addr[5:0];
    q_data   = host_wdata[7:0];
    start    = wr && (host_addr == A_CTRL) && host_wdata[0];
    hdr_we   = 1'b0;
    hdr_addr = '0;
    hdr_data = '0;
    if (second) begin
      hdr_we   = 1'b1;
      hdr_addr = second_addr;
      hdr_data = second_data;
    end else if (q_we) begin
      hdr_we   = 1'b1;
      hdr_addr = 11'(HDR_DQT_TAB + int'(q_addr));
      hdr_data = q_data;
    end else if (wr && (host_addr == A_W || host_addr == A_H)) begin
      hdr_we   = 1'b1;
      hdr_addr = (host_addr == A_W) ? 11'(HDR_SOF_W) : 11'(HDR_SOF_H);
      hdr_data = host_wdata[15:8];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      img_w       <= 16'(IMG_W_MAX);
      img_h       <= 16'(IMG_H_MAX);
      second      <= 1'b0;
      second_addr <= '0;
      second_data <= '0;
    end else begin
      second <= 1'b0;
      if (wr && host_addr == A_W) begin
        img_w       <= host_wdata;
        second      <= 1'b1;
        second_addr <= 11'(HDR_SOF_W + 1);
        second_data <= host_wdata[7:0];
      end
      if (q_we) begin
        second      <= 1'b1;
        second_addr <= 11'(HDR_DQT_TAB1 + int'(q_addr));
        second_data <= q_data;
      end
      if (wr && host_addr == A_H) begin
        img_h       <= host_wdata;
        second      <= 1'b1;
        second_addr <= 11'(HDR_SOF_H + 1);
        second_data <= host_wdata[7:0];
      end
    end
  end

endmodule
