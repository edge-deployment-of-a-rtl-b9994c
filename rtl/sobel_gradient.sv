// sobel_gradient: x and y derivatives of an 8-bit grey-level 3x3 window.
//
// Two mac3x3 units (nine power-of-two approximate multipliers each) apply
// the Sobel kernels
//   Gx = [-1 0 1; -2 0 2; -1 0 1]   (right minus left)
//   Gy = [-1 -2 -1; 0 0 0; 1 2 1]   (bottom minus top, y grows downwards)
// Every coefficient is 0, +-1 or +-2, so the approximate multipliers give
// exact derivatives. Using the MAC unit for the Sobel step follows the
// edge-detector description; the kernels are the standard Sobel ones.
//
// Interface: win[row][col], row 0 on top; fx, fy signed 12-bit
// (range +-1020). Purely combinational.
module sobel_gradient (
  input  logic [7:0]         win [3][3],
  output logic signed [11:0] fx,
  output logic signed [11:0] fy
);

  localparam logic signed [15:0] KX [9] = '{-16'sd1, 16'sd0, 16'sd1,
                                            -16'sd2, 16'sd0, 16'sd2,
                                            -16'sd1, 16'sd0, 16'sd1};
  localparam logic signed [15:0] KY [9] = '{-16'sd1, -16'sd2, -16'sd1,
                                             16'sd0,  16'sd0,  16'sd0,
                                             16'sd1,  16'sd2,  16'sd1};

  logic signed [15:0] px [9];
  logic signed [11:0] sx, sy;

  always_comb begin
    for (int i = 0; i < 9; i++) px[i] = 16'(win[i/3][i%3]);
  end

  mac3x3 #(.DW(16), .SUM_W(12)) u_gx (.win(px), .wt(KX), .sum(sx));
  mac3x3 #(.DW(16), .SUM_W(12)) u_gy (.win(px), .wt(KY), .sum(sy));

  assign fx = sx;
  assign fy = sy;

endmodule
