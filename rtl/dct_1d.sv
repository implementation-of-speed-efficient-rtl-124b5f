// dct_1d: 8-point DCT computed with ROM look-up tables (distributed arithmetic).
//
// Samples arrive one per cycle (in_valid/in_ready) in groups of eight. When a
// group is complete it is moved to a hold register and the eight outputs
// X[k] = sum_n x[n]*c(k)/2*cos((2n+1)k*pi/16), k = 0..7, leave one per cycle
// (out_valid/out_ready) while the next group is collected, so a steady
// stream runs at one sample per cycle: 64 cycles per 8x8 block per
// dimension. No multiplier is used: for every bit plane b of the eight held
// inputs, the eight bits b form an address into a 256-word ROM holding all
// partial sums of the basis row k; the IN_W words read are added with weight
// 2^b (the sign plane negatively). The ROM holds the basis scaled by 2^12;
// the sum is rounded (half up) by SHIFT bits and saturated to OUT_W.
// Latency: first output one cycle after the eighth input.
// ROM-based DCT without multipliers follows the design; the bit-parallel
// distributed-arithmetic form, the widths and the rounding are choices of
// this implementation.
module dct_1d import jpeg_pkg::*; #(
  parameter int IN_W  = 8,
  parameter int OUT_W = 13,
  parameter int SHIFT = 10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic signed [OUT_W-1:0] out_data
);

  typedef logic signed [15:0] da_rom_t [2048];

  // ROM word {k, a}: sum over n of a[n] * basis(k, n)
  function automatic da_rom_t gen_rom();
    da_rom_t r;
    for (int k = 0; k < 8; k++)
      for (int a = 0; a < 256; a++) begin
        int s = 0;
        for (int n = 0; n < 8; n++) if (a[n]) s += dct_coef(k, n);
        r[k*256 + a] = 16'(s);
      end
    return r;
  endfunction

  localparam da_rom_t DA_ROM = gen_rom();

  logic signed [IN_W-1:0] cx [8];   // collecting
  logic [3:0]             ccnt;
  logic signed [IN_W-1:0] hx [8];   // held for transform
  logic                   hbusy;
  logic [2:0]             hk;

  logic can_out, emit, last_k, load;

  assign can_out  = !out_valid || out_ready;
  assign emit     = hbusy && can_out;
  assign last_k   = (hk == 3'd7);
  assign load     = (ccnt == 4'd8) && (!hbusy || (emit && last_k));
  assign in_ready = (ccnt != 4'd8) || load;

  // distributed arithmetic evaluation of coefficient hk
  logic signed [31:0] acc;
  logic signed [31:0] rnd;
  always_comb begin
    acc = '0;
    for (int b = 0; b < IN_W; b++) begin
      logic [7:0] addr;
      logic signed [31:0] term;
      for (int n = 0; n < 8; n++) addr[n] = hx[n][b];
      term = 32'(DA_ROM[{hk, addr}]) <<< b;
      if (b == IN_W - 1) acc = acc - term;
      else               acc = acc + term;
    end
    rnd = (acc + (32'sd1 <<< (SHIFT - 1))) >>> SHIFT;
  end

  localparam int MAXV = (1 << (OUT_W - 1)) - 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ccnt      <= '0;
      hbusy     <= 1'b0;
      hk        <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int n = 0; n < 8; n++) begin
        cx[n] <= '0;
        hx[n] <= '0;
      end
    end else begin
      // output side
      if (emit) begin
        out_valid <= 1'b1;
        if (rnd > MAXV)       out_data <= OUT_W'(MAXV);
        else if (rnd < -MAXV) out_data <= OUT_W'(-MAXV);
        else                  out_data <= OUT_W'(rnd);
        hk <= hk + 3'd1;
        if (last_k) hbusy <= 1'b0;
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
      // hold register reload
      if (load) begin
        hx    <= cx;
        hbusy <= 1'b1;
        hk    <= '0;
      end
      // input side
      if (load) begin
        if (in_valid) begin
          cx[0] <= in_data;
          ccnt  <= 4'd1;
        end else begin
          ccnt  <= 4'd0;
        end
      end else if (in_valid && in_ready) begin
        cx[ccnt[2:0]] <= in_data;
        ccnt          <= ccnt + 4'd1;
      end
    end
  end

endmodule
