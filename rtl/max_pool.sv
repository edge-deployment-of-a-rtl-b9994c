// max_pool: K x K max pooling with stride K on a channel-interleaved stream.
//
// The input is a W x H x C feature map in raster order, channels
// interleaved. Within each group of K columns a per-channel register keeps
// the running maximum of the current row. At the group's last column that
// row maximum is compared with the partial column maximum stored for this
// (column group, channel) in a FIFO of (W/K)*C entries, and the larger value
// is written back. At the group's last row the value is the pooled result
// and is sent out. The output is (W/K) x (H/K) x C, same order. Columns and
// rows beyond the last full group are dropped. The row-then-FIFO scheme
// follows the pooling description; dropping remainders is this design's
// choice (it reproduces 198x38 -> 66x12 for K=3 and 64x10 -> 12x2 for K=5).
//
// Interface: valid/ready streams of Q8.8 values; one input per cycle when
// the output register is free. Reset: synchronous, active low.
module max_pool
  import iris_pkg::*;
#(
  parameter int C = 6,
  parameter int W = 198,
  parameter int H = 38,
  parameter int K = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  act_t in_data,
  output logic out_valid,
  input  logic out_ready,
  output act_t out_data
);

  localparam int WG = W / K;
  localparam int HG = H / K;
  localparam int CA = (C > 1) ? $clog2(C) : 1;

  act_t        rowmax [C];
  act_t        fifo   [WG*C];
  logic [15:0] ch, x, y, kx, xg, ky, yg;
  logic [CA-1:0] cha;
  logic        acc_in;
  act_t        rnew, cval;
  int          fidx;

  assign in_ready = !out_valid || out_ready;
  assign acc_in   = in_valid && in_ready;
  assign cha      = ch[CA-1:0];

  always_comb begin
    fidx = int'(xg) * C + int'(ch);
    if (fidx >= WG*C) fidx = 0;
    rnew = (kx == 0 || in_data > rowmax[cha]) ? in_data : rowmax[cha];
    cval = (ky == 0 || rnew > fifo[fidx]) ? rnew : fifo[fidx];
  end

  always_ff @(posedge clk) begin
    if (acc_in) begin
      rowmax[cha] <= rnew;
      if (kx == 16'(K - 1) && xg < 16'(WG)) fifo[fidx] <= cval;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ch <= '0; x <= '0; y <= '0; kx <= '0; xg <= '0; ky <= '0; yg <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (acc_in) begin
        if (kx == 16'(K - 1) && xg < 16'(WG) && ky == 16'(K - 1) && yg < 16'(HG)) begin
          out_valid <= 1'b1;
          out_data  <= cval;
        end
        // position counters: channel, then column, then row
        if (ch == 16'(C - 1)) begin
          ch <= '0;
          if (x == 16'(W - 1)) begin
            x <= '0; kx <= '0; xg <= '0;
            if (y == 16'(H - 1)) begin
              y <= '0; ky <= '0; yg <= '0;
            end else begin
              y <= y + 16'd1;
              if (ky == 16'(K - 1)) begin ky <= '0; yg <= yg + 16'd1; end
              else ky <= ky + 16'd1;
            end
          end else begin
            x <= x + 16'd1;
            if (kx == 16'(K - 1)) begin kx <= '0; xg <= xg + 16'd1; end
            else kx <= kx + 16'd1;
          end
        end else begin
          ch <= ch + 16'd1;
        end
      end
    end
  end

endmodule
