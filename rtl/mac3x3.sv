// mac3x3: multiply-accumulate of a 3x3 window with a 3x3 weight matrix.
//
// Nine approx_mult instances form the products win[i] * wt[i]; an adder tree
// sums them into a SUM_W-bit result. It is the MAC unit shared by the Sobel
// stage of the edge detector and by the convolution layers. Weights go to the
// multiplier's B input, so the result is exact when every weight is a signed
// power of two (or zero).
//
// Interface: win[0..8], wt[0..8] signed DW-bit, index = 3*row + column;
// sum signed SUM_W-bit. Purely combinational; the caller registers it.
module mac3x3 #(
  parameter int DW    = 16,
  parameter int SUM_W = 40
) (
  input  logic signed [DW-1:0]    win [9],
  input  logic signed [DW-1:0]    wt  [9],
  output logic signed [SUM_W-1:0] sum
);

  logic signed [2*DW-1:0] prod [9];

  for (genvar i = 0; i < 9; i++) begin : g_mul
    approx_mult #(.N(DW)) u_mul (.a(win[i]), .b(wt[i]), .p(prod[i]));
  end

  always_comb begin
    sum = '0;
    for (int i = 0; i < 9; i++) sum = sum + SUM_W'(prod[i]);
  end

endmodule
