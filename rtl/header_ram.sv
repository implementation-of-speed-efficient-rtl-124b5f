// header_ram: 2048 x 8 dual-port RAM holding the JFIF header.
//
// Port A (write) lets the host interface change the configurable fields
// (image size, quantization table); port B (read, registered, with read
// enable: the output keeps its value while rd_en is low) feeds the JFIF
// generator. The RAM starts with the fixed header template of jpeg_pkg
// (HDR_LEN bytes, rest zero), given as its initial content so that it maps
// to an initialised block RAM.
// Size, dual port and a mostly preset content with host-written fields
// follow the design; the template is built from package constants rather
// than read from a file.
module header_ram import jpeg_pkg::*; #(
  parameter int DEPTH = 2048
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [7:0]               wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [7:0]               rd_data
);

  logic [7:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = (i < HDR_LEN) ? HDR_TEMPLATE[i] : 8'h00;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
