// line_window: 3x3 sliding window over a raster-order stream.
//
// Two line buffers of W entries hold the two previous rows; a 3x3 register
// window shifts left by one column for every accepted pixel, taking the
// pixel two rows up, one row up and the new pixel into its right column.
// This is the "two cache lines" structure in front of every 3x3 operator.
// Only windows lying completely inside the W x H frame are flagged, so an
// operator behind it produces (W-2) x (H-2) results (no padding).
//
// Interface: in_valid marks a cycle in which in_data is taken (the caller
// does the handshake). One cycle later win holds the window whose bottom
// right pixel is that pixel, and win_valid is high for that one cycle when
// the window is complete; win_col/win_row give that bottom right position.
// win is stable until the next accepted pixel. win[0] is the oldest row,
// win[r][2] the newest column. Frame position wraps after W x H pixels.
// Reset: synchronous, active low, clears the position and win_valid.
module line_window #(
  parameter int DW = 16,
  parameter int W  = 200,
  parameter int H  = 40
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [DW-1:0] in_data,
  output logic [DW-1:0] win [3][3],
  output logic          win_valid,
  output logic [15:0]   win_col,
  output logic [15:0]   win_row
);

  localparam int AW = (W > 1) ? $clog2(W) : 1;

  logic [DW-1:0] lb_top [W];   // row y-2
  logic [DW-1:0] lb_mid [W];   // row y-1
  logic [15:0]   col, row;
  logic [AW-1:0] ca;

  assign ca = col[AW-1:0];

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb_top[ca] <= lb_mid[ca];
      lb_mid[ca] <= in_data;
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
      end
      win[0][2] <= lb_top[ca];
      win[1][2] <= lb_mid[ca];
      win[2][2] <= in_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      win_valid <= 1'b0;
      win_col   <= '0;
      win_row   <= '0;
    end else begin
      win_valid <= in_valid && (col >= 16'd2) && (row >= 16'd2);
      if (in_valid) begin
        win_col <= col;
        win_row <= row;
        if (col == 16'(W - 1)) begin
          col <= '0;
          row <= (row == 16'(H - 1)) ? '0 : row + 16'd1;
        end else begin
          col <= col + 16'd1;
        end
      end
    end
  end

endmodule
