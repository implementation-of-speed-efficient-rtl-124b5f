// quantizer: Fout(u,v) = round(Fin(u,v) / Q(u,v)) for a stream of blocks.
//
// The 64 quantization coefficients sit in an internal 64x8 RAM, addressed
// by the position of the sample in its block (zig-zag order, as in the JPEG
// DQT segment); it resets to the Annex K luminance table and is rewritten
// through the q_we/q_addr/q_data port. A sample counter selects Q. The
// division rounds half away from zero: |Fout| = floor((2|Fin| + Q) / 2Q),
// done by a 12-stage pipelined restoring divider (one quotient bit per
// stage) after one preparation stage, so one sample enters per cycle and
// leaves 13 cycles later. The whole pipeline stalls when out_ready is low
// with a valid output. Q = 0 is treated as 1.
// The RAM size, formula and rounding follow the design; the divider
// structure is this implementation's.
module quantizer import jpeg_pkg::*; (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clr,
  input  logic                     q_we,
  input  logic [5:0]               q_addr,
  input  logic [7:0]               q_data,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [COEF_W-1:0] in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic signed [COEF_W-1:0] out_data
);

  localparam int NQ = 12;   // quotient bits (dividend < 2^12)

  logic [7:0]  qram [64];
  logic [5:0]  idx;
  logic        en;

  logic              vld [NQ+1];
  logic              sgn [NQ+1];
  logic [11:0]       num [NQ+1];
  logic [8:0]        dvs [NQ+1];
  logic [8:0]        rem [NQ+1];
  logic [11:0]       quo [NQ+1];

  assign en       = !vld[NQ] || out_ready;
  assign in_ready = en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 64; i++) qram[i] <= DEFAULT_QTAB[i];
    end else if (q_we) begin
      qram[q_addr] <= q_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     idx <= '0;
    else if (clr)                   idx <= '0;
    else if (in_valid && in_ready)  idx <= idx + 6'd1;
  end

  // stage 0: sign, magnitude, dividend 2|F|+Q, divisor 2Q
  logic [7:0]  q_now;
  logic [11:0] mag;
  assign q_now = (qram[idx] == 8'd0) ? 8'd1 : qram[idx];
  assign mag   = in_data[COEF_W-1] ? 12'(-in_data) : 12'(in_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= NQ; s++) begin
        vld[s] <= 1'b0; sgn[s] <= 1'b0; num[s] <= '0;
        dvs[s] <= '0;   rem[s] <= '0;   quo[s] <= '0;
      end
    end else if (en) begin
      vld[0] <= in_valid;
      sgn[0] <= in_data[COEF_W-1];
      num[0] <= 12'({mag, 1'b0} + {4'd0, q_now});
      dvs[0] <= {q_now, 1'b0};
      rem[0] <= '0;
      quo[0] <= '0;
      for (int s = 0; s < NQ; s++) begin
        logic [9:0] r;
        r = {rem[s], num[s][NQ-1-s]};
        vld[s+1] <= vld[s];
        sgn[s+1] <= sgn[s];
        num[s+1] <= num[s];
        dvs[s+1] <= dvs[s];
        if (r >= {1'b0, dvs[s]}) begin
          rem[s+1] <= 9'(r - {1'b0, dvs[s]});
          quo[s+1] <= {quo[s][10:0], 1'b1};
        end else begin
          rem[s+1] <= r[8:0];
          quo[s+1] <= {quo[s][10:0], 1'b0};
        end
      end
    end
  end

  assign out_valid = vld[NQ];
  assign out_data  = sgn[NQ] ? -COEF_W'(quo[NQ]) : COEF_W'(quo[NQ]);

endmodule
